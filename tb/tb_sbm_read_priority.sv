// tb_sbm_read_priority: first the worked example of the cell-read mechanism
// (four ports, unicast heads of ports 0, 1 and 3 in SBM 1, port 2 in SBM 3;
// multicast candidates of ports 1, 0, 2, 3 in SBMs 1, 2, 3, 3 in that priority
// order), then random cases against a cycle-by-cycle greedy model: in each of
// the three read cycles every SBM serves its highest-priority unserved unicast
// head; in the last cycle the SBMs left idle serve their highest-priority
// multicast candidate; at a port reached by both, the longer queue wins.
module tb_sbm_read_priority;
  localparam int N = 8;
  logic [N-1:0]        uc_valid, mc_valid, uc_read, mc_read, mc_blocked, send_uc, send_mc;
  logic [N-1:0][2:0]   uc_sbm, mc_sbm;
  logic [N-1:0][11:0]  uc_qlen, mc_qlen;
  logic [N-1:0][1:0]   uc_cyc;
  logic [2:0][N-1:0]   rd_en, rd_mc;
  logic [2:0][N-1:0][2:0] rd_port;
  int checks = 0, failures = 0;

  sbm_read_priority #(.NPORT(N), .NSBM(N), .KW(12), .NRD(3)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic bit ahead(logic [11:0] ka, int a, logic [11:0] kb, int b);
    return (ka > kb) || (ka == kb && a < b);
  endfunction

  task automatic model_check();
    bit   served [N];
    int   e_cyc [N];
    bit   busy_last [N];
    bit   e_mc [N];
    for (int o = 0; o < N; o++) begin served[o] = 0; e_cyc[o] = -1; e_mc[o] = 0; busy_last[o] = 0; end
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < N; s++) begin
        int best;
        best = -1;
        for (int o = 0; o < N; o++)
          if (uc_valid[o] && !served[o] && uc_sbm[o] == 3'(s) &&
              (best < 0 || ahead(uc_qlen[o], o, uc_qlen[best], best))) best = o;
        if (best >= 0) begin
          served[best] = 1; e_cyc[best] = r;
          if (r == 2) busy_last[s] = 1;
        end
      end
    for (int s = 0; s < N; s++) if (!busy_last[s]) begin
      int best;
      best = -1;
      for (int o = 0; o < N; o++)
        if (mc_valid[o] && mc_sbm[o] == 3'(s) && (best < 0 || ahead(mc_qlen[o], o, mc_qlen[best], best)))
          best = o;
      if (best >= 0) e_mc[best] = 1;
    end
    for (int o = 0; o < N; o++) begin
      bit eu, em;
      chk(uc_read[o] == served[o], $sformatf("uc_read[%0d]", o));
      if (served[o]) chk(int'(uc_cyc[o]) == e_cyc[o], $sformatf("uc_cyc[%0d]=%0d exp %0d", o, uc_cyc[o], e_cyc[o]));
      chk(mc_read[o] == e_mc[o], $sformatf("mc_read[%0d]", o));
      chk(mc_blocked[o] == (mc_valid[o] && busy_last[mc_sbm[o]]), $sformatf("mc_blocked[%0d]", o));
      eu = served[o] && (!e_mc[o] || uc_qlen[o] >= mc_qlen[o]);
      em = e_mc[o] && !eu;
      chk(send_uc[o] == eu && send_mc[o] == em, $sformatf("send[%0d]", o));
      if (served[o]) chk(rd_en[e_cyc[o]][uc_sbm[o]] && int'(rd_port[e_cyc[o]][uc_sbm[o]]) == o &&
                         !rd_mc[e_cyc[o]][uc_sbm[o]], "per-SBM unicast view");
      if (e_mc[o]) chk(rd_en[2][mc_sbm[o]] && int'(rd_port[2][mc_sbm[o]]) == o && rd_mc[2][mc_sbm[o]],
                       "per-SBM multicast view");
    end
  endtask

  initial begin
    // worked example, ports 0..3 only
    uc_valid = 8'h0F; mc_valid = 8'h0F;
    uc_sbm = '0; mc_sbm = '0; uc_qlen = '0; mc_qlen = '0;
    uc_sbm[0] = 3'd1; uc_sbm[1] = 3'd1; uc_sbm[2] = 3'd3; uc_sbm[3] = 3'd1;
    uc_qlen[2] = 12'd40; uc_qlen[0] = 12'd30; uc_qlen[1] = 12'd20; uc_qlen[3] = 12'd10;
    mc_sbm[1] = 3'd1; mc_sbm[0] = 3'd2; mc_sbm[2] = 3'd3; mc_sbm[3] = 3'd3;
    mc_qlen[1] = 12'd40; mc_qlen[0] = 12'd35; mc_qlen[2] = 12'd20; mc_qlen[3] = 12'd10;
    #1;
    chk(uc_read[3:0] == 4'hF, "example: all unicast heads read");
    chk(uc_cyc[2] == 0 && uc_cyc[0] == 0 && uc_cyc[1] == 1 && uc_cyc[3] == 2, "example: read cycles");
    chk(mc_read[3:0] == 4'b0101, "example: multicast read for ports 0 and 2 only");
    chk(mc_blocked[3:0] == 4'b0010, "example: multicast for port 1 blocked by unicast in SBM 1");
    chk(send_mc[3:0] == 4'b0001 && send_uc[3:0] == 4'b1110, "example: port 0 sends the multicast cell");
    model_check();
    for (int it = 0; it < 3000; it++) begin
      for (int o = 0; o < N; o++) begin
        uc_valid[o] = ($urandom_range(9) < 8);
        mc_valid[o] = ($urandom_range(9) < 5);
        uc_sbm[o]   = 3'($urandom_range(it % 2 ? 2 : 7));
        mc_sbm[o]   = 3'($urandom_range(7));
        uc_qlen[o]  = 12'($urandom_range(it % 3 == 0 ? 3 : 2000));
        mc_qlen[o]  = 12'($urandom_range(it % 3 == 0 ? 3 : 2000));
      end
      #1;
      model_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_connection_controller: surrounds the controller with simple lane models
// that answer its strobes after random delays, and runs many messages in all
// three lane modes (plus the empty mode). Checks that only enabled lanes get
// strobes, that in_ready is high exactly while loading, that each phase
// waits for the slowest enabled lane, that each memory element is replayed
// exactly twice (count, encode), and that done pulses once per run.
module tb_connection_controller;
  import src_enc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, in_valid, in_last, in_ready, route_enc, busy, done, sf_mode, sf_sel;
  enc_mode_e mode;
  logic [1:0] lane_en, mem_clr, mem_wr, mem_rd_start, freq_clr, freq_s;
  logic [1:0] comp_start, comp_done, cg_start, cg_msg_req, cg_done;
  ctrl_phase_e phase;

  connection_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Lane models: a countdown per activity.
  int fdly [2], cdly [2], gdly [2], rdly [2];
  int n_rd [2], n_wr [2], n_cs [2], n_gs [2], n_done;

  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      if (rst || freq_clr[l]) begin freq_s[l] <= 0; fdly[l] <= -1; end
      else if (mem_rd_start[l] && !route_enc) fdly[l] <= $urandom_range(1, 20);
      else if (fdly[l] > 0) fdly[l] <= fdly[l] - 1;
      else if (fdly[l] == 0) begin freq_s[l] <= 1; fdly[l] <= -1; end

      if (rst) begin comp_done[l] <= 0; cdly[l] <= -1; end
      else if (comp_start[l]) begin comp_done[l] <= 0; cdly[l] <= $urandom_range(1, 30); end
      else if (cdly[l] > 0) cdly[l] <= cdly[l] - 1;
      else if (cdly[l] == 0) begin comp_done[l] <= 1; cdly[l] <= -1; end

      cg_msg_req[l] <= 0;
      if (rst) begin cg_done[l] <= 0; gdly[l] <= -1; rdly[l] <= -1; end
      else if (cg_start[l]) begin cg_done[l] <= 0; rdly[l] <= $urandom_range(1, 10); end
      else if (rdly[l] > 0) rdly[l] <= rdly[l] - 1;
      else if (rdly[l] == 0) begin cg_msg_req[l] <= 1; rdly[l] <= -1; gdly[l] <= $urandom_range(1, 20); end
      else if (gdly[l] > 0) gdly[l] <= gdly[l] - 1;
      else if (gdly[l] == 0) begin cg_done[l] <= 1; gdly[l] <= -1; end
    end
  end

  // Monitors.
  always @(posedge clk) if (!rst) begin
    for (int l = 0; l < 2; l++) begin
      if (mem_rd_start[l]) n_rd[l]++;
      if (mem_wr[l]) n_wr[l]++;
      if (comp_start[l]) n_cs[l]++;
      if (cg_start[l]) n_gs[l]++;
    end
    if (done) n_done++;
    checks++;
    if (in_ready != (phase == PH_LOAD)) begin failures++; $display("FAIL in_ready"); end
    checks++;
    if ((comp_start != 0) && ((freq_s & lane_en) != lane_en)) begin failures++; $display("FAIL early compress start"); end
    checks++;
    if ((cg_start != 0) && ((comp_done & lane_en) != lane_en)) begin failures++; $display("FAIL early code start"); end
  end

  initial begin
    rst = 1; start = 0; in_valid = 0; in_last = 0; mode = MODE_NONE; sf_mode = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 120; t++) begin
      int L, guard;
      enc_mode_e m;
      m = enc_mode_e'(t % 4);
      L = $urandom_range(1, 15);
      for (int l = 0; l < 2; l++) begin n_rd[l] = 0; n_wr[l] = 0; n_cs[l] = 0; n_gs[l] = 0; end
      n_done = 0;
      mode = m; start = 1; sf_mode = t[2];
      #1 check(mem_clr == m && freq_clr == m, "clear strobes follow the mode");
      @(negedge clk); start = 0; sf_mode = !t[2];
      if (m != MODE_NONE) begin
        for (int i = 0; i < L; i++) begin
          // random idle cycles between characters
          while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_last = (i == L - 1);
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
      end
      guard = 0;
      while (phase != PH_IDLE && guard < 500) begin @(negedge clk); guard++; end
      check(lane_en == m, "lane enable mask");
      check(sf_sel == t[2], "Shannon lane algorithm latched at start");
      check(n_done == 1, "done once per run");
      for (int l = 0; l < 2; l++) begin
        check(n_wr[l] == (m[l] ? L : 0), "writes only to enabled lanes");
        check(n_rd[l] == (m[l] ? 2 : 0), "two replays per enabled lane");
        check(n_cs[l] == (m[l] ? 1 : 0), "one compress start per enabled lane");
        check(n_gs[l] == (m[l] ? 1 : 0), "one code start per enabled lane");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

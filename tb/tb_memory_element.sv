// tb_memory_element: loads random messages of every length from 0 to 17,
// replays them twice and compares the stream, out_last, status, len and the
// overflow flag with the written data. Also checks that reset zeroes the
// locations and that replay takes one cycle per character.
module tb_memory_element;
  import src_enc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst, clr, wr_en, rd_start;
  logic [SYM_W-1:0] wr_data, out_data;
  logic out_valid, out_last, status, overflow;
  logic [$clog2(MAX_LEN+1)-1:0] len;

  memory_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [SYM_W-1:0] ref_msg [MAX_LEN];

  initial begin
    rst = 1; clr = 0; wr_en = 0; rd_start = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(len == 0 && !status && !overflow, "reset state");
    for (int L = 0; L <= MAX_LEN + 2; L++) begin
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int i = 0; i < L; i++) begin
        wr_en = 1; wr_data = SYM_W'($urandom);
        if (i < MAX_LEN) ref_msg[i] = wr_data;
        @(negedge clk);
      end
      wr_en = 0;
      check(int'(len) == ((L > MAX_LEN) ? MAX_LEN : L), "length");
      check(overflow == (L > MAX_LEN), "overflow flag");
      for (int rep = 0; rep < 2; rep++) begin
        int n, cyc;
        rd_start = 1; @(negedge clk); rd_start = 0;
        n = 0; cyc = 0;
        while (!status && cyc < 40) begin
          if (out_valid) begin
            check(out_data == ref_msg[n], "replayed data");
            check(out_last == (n == ((L > MAX_LEN) ? MAX_LEN : L) - 1), "out_last");
            n++;
          end
          cyc++;
          @(negedge clk);
        end
        check(n == ((L > MAX_LEN) ? MAX_LEN : L), "replay count");
        check(cyc == n, "one character per cycle");
      end
    end
    // Reset empties the store: nothing is replayed afterwards.
    rst = 1; @(negedge clk); rst = 0;
    check(len == 0 && !overflow, "reset empties the store");
    rd_start = 1; @(negedge clk); rd_start = 0;
    check(!out_valid && status, "empty replay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

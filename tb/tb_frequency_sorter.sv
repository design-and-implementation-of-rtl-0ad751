// tb_frequency_sorter: random count tables, including ties and empty
// entries. Checks that the output is in descending count order, that it is
// a permutation of the input, that equal counts keep their input order and
// that done rises N cycles after en. Also checks the active-low reset.
module tb_frequency_sorter;
  import src_enc_pkg::*;
  localparam int N = MAX_LEN;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n, en, done;
  logic [SYM_W-1:0] sym_in [N], sym_out [N];
  logic [CNT_W-1:0] cnt_in [N], cnt_out [N];

  frequency_sorter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    rst_n = 0; en = 0;
    for (int i = 0; i < N; i++) begin sym_in[i] = '0; cnt_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!done && cnt_out[0] == 0, "reset");
    for (int t = 0; t < 300; t++) begin
      int maxc;
      maxc = $urandom_range(1, N);
      for (int i = 0; i < N; i++) begin
        sym_in[i] = SYM_W'(i + 1);   // input position as the tag
        cnt_in[i] = CNT_W'($urandom_range(0, maxc));
      end
      en = 1; @(negedge clk); en = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == N + 1, "sort latency N cycles after en");
      for (int i = 0; i + 1 < N; i++) begin
        check(cnt_out[i] >= cnt_out[i+1], "descending");
        if (cnt_out[i] == cnt_out[i+1]) check(sym_out[i] < sym_out[i+1], "stable on ties");
      end
      for (int i = 0; i < N; i++) begin
        int tag;
        tag = int'(sym_out[i]);
        check(tag >= 1 && tag <= N && cnt_in[tag-1] == cnt_out[i], "permutation");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

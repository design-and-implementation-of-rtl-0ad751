// tb_freq_adder: checks SUM = NUM_1 + NUM_2 on all operand pairs of the
// default width and on random pairs of a wider instance.
module tb_freq_adder;
  import src_enc_pkg::*;
  int checks = 0, failures = 0;

  logic [CNT_W-1:0] a, b, s;
  logic [11:0]      wa, wb, ws;

  freq_adder dut (.NUM_1(a), .NUM_2(b), .SUM(s));
  freq_adder #(.W(12)) dut_w (.NUM_1(wa), .NUM_2(wb), .SUM(ws));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << CNT_W); i++)
      for (int j = 0; j < (1 << CNT_W); j++) begin
        a = CNT_W'(i); b = CNT_W'(j); #1;
        checks++;
        if (int'(s) != ((i + j) % (1 << CNT_W))) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, j, s);
        end
      end
    repeat (200) begin
      wa = 12'($urandom_range(0, 2047)); wb = 12'($urandom_range(0, 2047)); #1;
      checks++;
      if (int'(ws) != int'(wa) + int'(wb)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

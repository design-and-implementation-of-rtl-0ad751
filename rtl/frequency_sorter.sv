// frequency_sorter: orders (symbol, count) pairs by descending count.
//
// A pulse on `en` captures the table from the frequency calculator; the
// sorter then runs an odd-even transposition sort, alternating compare-swap
// of pairs (0,1),(2,3),... and (1,2),(3,4),... once per cycle. N such passes
// sort any N entries. A pair is swapped only when the right count is
// strictly larger, so equal counts keep their order of first occurrence.
// Unused entries carry count 0 and collect at the end.
//
// Timing: `done` rises N cycles after `en` and holds until the next `en`.
//
// From the document: descending order, the active-high enable and the
// active-low reset. The sorting network is this design's choice.
module frequency_sorter
  import src_enc_pkg::*;
#(
  parameter int unsigned N  = MAX_LEN,
  parameter int unsigned DW = SYM_W,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,          // active low
  input  logic          en,             // load and start
  input  logic [DW-1:0] sym_in [N],
  input  logic [CW-1:0] cnt_in [N],
  output logic [DW-1:0] sym_out [N],
  output logic [CW-1:0] cnt_out [N],
  output logic          done
);
  localparam int unsigned PW = $clog2(N + 1);

  logic [PW-1:0] pass;
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        sym_out[i] <= '0;
        cnt_out[i] <= '0;
      end
      pass <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (en) begin
      sym_out <= sym_in;
      cnt_out <= cnt_in;
      pass    <= '0;
      busy    <= 1'b1;
      done    <= 1'b0;
    end else if (busy) begin
      for (int i = 0; i + 1 < int'(N); i++) begin
        if ((i % 2) == int'(pass[0]) && cnt_out[i+1] > cnt_out[i]) begin
          sym_out[i]   <= sym_out[i+1];
          cnt_out[i]   <= cnt_out[i+1];
          sym_out[i+1] <= sym_out[i];
          cnt_out[i+1] <= cnt_out[i];
        end
      end
      pass <= pass + 1'b1;
      if (pass == PW'(N - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule

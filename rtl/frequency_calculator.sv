// frequency_calculator: counts how often each distinct symbol occurs.
//
// Consumes the character stream replayed by the memory element. Every
// character is compared in parallel with the table of symbols seen so far;
// a match increments that entry's count, a new symbol is appended with a
// count of one. Table entries appear in order of first occurrence. When the
// character flagged in_last has been counted, status S goes to 1 and stays
// there until clr; it is the signal that lets the compression module start.
//
// Interface: in_valid/in_data/in_last stream in, sym[]/cnt[]/n_unique out.
// Timing: one character per cycle; S rises the cycle after the last one.
//
// From the document: the occurrence count of each unique word, the status
// S, and the active-high reset that zeroes the counts. The parallel compare
// and the table layout are this design's choice.
module frequency_calculator
  import src_enc_pkg::*;
#(
  parameter int unsigned N  = MAX_LEN,
  parameter int unsigned DW = SYM_W,
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic                     clk,
  input  logic                     rst,     // active high, clears all counts
  input  logic                     clr,     // start a new count
  input  logic                     in_valid,
  input  logic [DW-1:0]            in_data,
  input  logic                     in_last,
  output logic [DW-1:0]            sym [N],
  output logic [CW-1:0]            cnt [N],
  output logic [$clog2(N+1)-1:0]   n_unique,
  output logic                     s
);
  logic             hit;
  logic [$clog2(N)-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (!hit && (i < int'(n_unique)) && sym[i] == in_data) begin
        hit     = 1'b1;
        hit_idx = i[$clog2(N)-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int i = 0; i < int'(N); i++) begin
        sym[i] <= '0;
        cnt[i] <= '0;
      end
      n_unique <= '0;
      s        <= 1'b0;
    end else if (in_valid && !s) begin
      if (hit) begin
        cnt[hit_idx] <= cnt[hit_idx] + 1'b1;
      end else if (n_unique < ($clog2(N+1))'(N)) begin
        sym[n_unique[$clog2(N)-1:0]] <= in_data;
        cnt[n_unique[$clog2(N)-1:0]] <= CW'(1);
        n_unique <= n_unique + 1'b1;
      end
      if (in_last) s <= 1'b1;
    end
  end

endmodule

// memory_element: message store at the head of an encoding lane.
//
// Holds up to MAX_LEN input characters of SYM_W bits in a register array.
// Characters are appended one per cycle with wr_en while the lane loads;
// writes beyond MAX_LEN are dropped and flag `overflow`. A pulse on rd_start
// replays the stored message, one character per cycle on out_valid/out_data
// (out_last on the final one), to whatever block the controller connects:
// first the frequency calculator, later the symbol encoder. `status` goes to
// 1 in the cycle after the last character has been passed on and stays 1
// until the next rd_start or clr.
//
// Timing: the first character appears the cycle after rd_start; a message
// of L characters takes L cycles. An empty message raises status directly.
//
// From the document: the store, the status signal that marks the complete
// hand-over, and an active-high reset that clears every location to zero.
// The append/replay interface and the overflow flag are this design's own.
module memory_element
  import src_enc_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_LEN,
  parameter int unsigned DW    = SYM_W
) (
  input  logic                       clk,
  input  logic                       rst,       // active high, clears all locations
  input  logic                       clr,       // start a new message
  input  logic                       wr_en,
  input  logic [DW-1:0]              wr_data,
  input  logic                       rd_start,
  output logic                       out_valid,
  output logic [DW-1:0]              out_data,
  output logic                       out_last,
  output logic                       status,
  output logic [$clog2(DEPTH+1)-1:0] len,
  output logic                       overflow
);
  localparam int unsigned AW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr;
  logic          reading;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      len      <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      len      <= '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      if (len < AW'(DEPTH)) begin
        mem[len[$clog2(DEPTH)-1:0]] <= wr_data;
        len <= len + 1'b1;
      end else begin
        overflow <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      reading <= 1'b0;
      rd_ptr  <= '0;
      status  <= 1'b0;
    end else if (rd_start) begin
      rd_ptr  <= '0;
      reading <= (len != '0);
      status  <= (len == '0);
    end else if (reading) begin
      if (rd_ptr == len - 1'b1) begin
        reading <= 1'b0;
        status  <= 1'b1;
      end
      rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign out_valid = reading;
  assign out_data  = mem[rd_ptr[$clog2(DEPTH)-1:0]];
  assign out_last  = reading && (rd_ptr == len - 1'b1);

endmodule

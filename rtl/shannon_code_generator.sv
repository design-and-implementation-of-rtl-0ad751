// shannon_code_generator: forms the Shannon code words and encodes the
// message with them.
//
// For sorted symbol i the code word is the first len[i] bits of the binary
// expansion of the cumulative probability cum[i]/T. The expansion is done by
// restoring long division, one bit per cycle: the remainder r starts at
// cum[i]; each step doubles it, emits 1 and subtracts T when 2r >= T, and
// emits 0 otherwise. Bits are shifted in so that the first one ends up as
// the code word's most significant bit. With all code words known it pulses
// msg_req, the lane's memory element replays the message, and the
// symbol_encoder replaces each character by its code word. `done` rises after
// the last character and holds until the next start. With sf_mode set at
// start the code words built by the Shannon-Fano splitting (sf_code) are
// taken as they are and the division is skipped.
//
// Timing: one cycle per code bit, then the message length plus a few cycles.
//
// From the document: the code words its Shannon example prints (binary
// expansion of the cumulative probability). The bit-serial division is this
// design's choice.
module shannon_code_generator
  import src_enc_pkg::*;
#(
  parameter int unsigned N     = MAX_LEN,
  parameter int unsigned DW    = SYM_W,
  parameter int unsigned CW    = $clog2(N + 1),
  parameter int unsigned CDW   = N - 1,
  parameter int unsigned CLW   = $clog2(CDW + 1),
  parameter int unsigned BUF_W = N * CDW,
  parameter int unsigned BLW   = $clog2(BUF_W + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   sf_mode,      // take sf_code as the code words
  input  logic [DW-1:0]          sym_s [N],
  input  logic [$clog2(N+1)-1:0] n_unique,
  input  logic [CW-1:0]          cum [N],
  input  logic [CLW-1:0]         len_in [N],
  input  logic [CDW-1:0]         sf_code [N],
  input  logic [CW-1:0]          total,
  // message replay from the memory element
  output logic                   msg_req,
  input  logic                   in_valid,
  input  logic [DW-1:0]          in_data,
  input  logic                   in_last,
  // results
  output logic [CDW-1:0]         code [N],
  output logic [CLW-1:0]         len  [N],
  output logic                   out_valid,
  output logic [CDW-1:0]         out_code,
  output logic [CLW-1:0]         out_len,
  output logic [BUF_W-1:0]       comp_bits,
  output logic [BLW-1:0]         comp_len,
  output logic                   done
);
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [2:0] {G_IDLE, G_GEN, G_REQ, G_ENC, G_DONE} state_e;
  state_e state;

  logic [IW-1:0]  sidx;
  logic [CLW-1:0] k;
  logic [CW:0]    r, r_cur, r2;
  logic           bit_n;
  logic [CDW-1:0] acc;
  logic           enc_done;

  always_comb begin
    r_cur = (k == '0) ? {1'b0, cum[sidx[$clog2(N)-1:0]]} : r;
    r2    = r_cur << 1;
    bit_n = (r2 >= {1'b0, total});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= G_IDLE;
      sidx  <= '0;
      k     <= '0;
      r     <= '0;
      acc   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        code[i] <= '0;
        len[i]  <= '0;
      end
    end else begin
      unique case (state)
        G_IDLE, G_DONE: if (start) begin
          done <= 1'b0;
          sidx <= '0;
          k    <= '0;
          acc  <= '0;
          for (int i = 0; i < int'(N); i++) begin
            code[i] <= sf_mode ? sf_code[i] : '0;
            len[i]  <= len_in[i];
          end
          if (n_unique == '0) begin
            state <= G_DONE;
            done  <= 1'b1;
          end else if (sf_mode) begin
            state <= G_REQ;
          end else begin
            state <= G_GEN;
          end
        end
        G_GEN: begin
          r <= bit_n ? r2 - {1'b0, total} : r2;
          if (k + 1'b1 == len[sidx[$clog2(N)-1:0]]) begin
            code[sidx[$clog2(N)-1:0]] <= {acc[CDW-2:0], bit_n};
            acc  <= '0;
            k    <= '0;
            sidx <= sidx + 1'b1;
            if (sidx + 1'b1 == n_unique) state <= G_REQ;
          end else begin
            acc <= {acc[CDW-2:0], bit_n};
            k   <= k + 1'b1;
          end
        end
        G_REQ: state <= G_ENC;
        G_ENC: if (enc_done) begin
          state <= G_DONE;
          done  <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign msg_req = (state == G_REQ);

  symbol_encoder #(.N(N), .DW(DW), .CDW(CDW), .CLW(CLW), .BUF_W(BUF_W), .BLW(BLW)) u_enc (
    .clk, .rst, .clr((state == G_IDLE || state == G_DONE) && start),
    .tab_sym(sym_s), .tab_code(code), .tab_len(len), .tab_n(n_unique),
    .in_valid(in_valid && state == G_ENC), .in_data, .in_last,
    .out_valid, .out_code, .out_len, .comp_bits, .comp_len, .done(enc_done)
  );

endmodule

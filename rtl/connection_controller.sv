// connection_controller: the controller / connection optimizer.
//
// It decides which encoding lanes take part in a run and steps them through
// it. Lane 0 is the Huffman lane, lane 1 the Shannon lane. On `start` the
// mode is latched as a lane-enable mask (Huffman, Shannon or both), the
// selected lanes' memory elements and frequency calculators are cleared, and
// the Shannon lane's algorithm is latched from sf_mode (0 Shannon, 1
// Shannon-Fano) and handed to it as sf_sel. Then the phases follow:
//   LOAD  - in_ready is high; every accepted character is written into the
//           memory element of each enabled lane, until in_last.
//   COUNT - the memory elements replay the message into the frequency
//           calculators; wait for every enabled lane's status S.
//   BUILD - start the compression modules (sort, tree or cumulative
//           counts); wait for all of them.
//   CODE  - start the code generators; route each memory element's replay
//           to its lane's encoder (route_enc) and pass a generator's msg_req
//           on to its memory element; wait for all of them.
//   DONE  - `done` for one cycle, then back to idle; a new `start` is
//           already accepted in this cycle.
// Lanes that are not enabled receive no strobes and keep their last result.
//
// From the document: a central controller that enables the other modules,
// coordinates them and sets up the connections that make the design
// reconfigurable. The phase sequence, the mode encoding and the handshakes
// are this design's choices.
module connection_controller
  import src_enc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  enc_mode_e   mode,
  input  logic        sf_mode,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  output logic [1:0]  lane_en,
  output logic        sf_sel,
  output logic [1:0]  mem_clr,
  output logic [1:0]  mem_wr,
  output logic [1:0]  mem_rd_start,
  output logic        route_enc,
  output logic [1:0]  freq_clr,
  input  logic [1:0]  freq_s,
  output logic [1:0]  comp_start,
  input  logic [1:0]  comp_done,
  output logic [1:0]  cg_start,
  input  logic [1:0]  cg_msg_req,
  input  logic [1:0]  cg_done,
  output ctrl_phase_e phase,
  output logic        busy,
  output logic        done
);
  logic kick;   // replay request for the COUNT phase

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= PH_IDLE;
      lane_en <= '0;
      sf_sel  <= 1'b0;
      kick    <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE, PH_DONE: if (start) begin
          lane_en <= mode;
          sf_sel  <= sf_mode;
          phase   <= (mode == MODE_NONE) ? PH_DONE : PH_LOAD;
        end else begin
          phase   <= PH_IDLE;
        end
        PH_LOAD: if (in_valid && in_last) begin
          phase <= PH_COUNT;
          kick  <= 1'b1;
        end
        PH_COUNT: begin
          kick <= 1'b0;
          if (!kick && (freq_s & lane_en) == lane_en) phase <= PH_BUILD;
        end
        PH_BUILD: if ((comp_done & lane_en) == lane_en) phase <= PH_CODE;
        PH_CODE:  if ((cg_done & lane_en) == lane_en) phase <= PH_DONE;
        default:  phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    in_ready     = (phase == PH_LOAD);
    mem_clr      = ((phase == PH_IDLE || phase == PH_DONE) && start) ? mode : 2'b00;
    freq_clr     = mem_clr;
    mem_wr       = (phase == PH_LOAD && in_valid) ? lane_en : 2'b00;
    route_enc    = (phase == PH_CODE);
    mem_rd_start = (phase == PH_COUNT && kick) ? lane_en :
                   (phase == PH_CODE) ? (cg_msg_req & lane_en) : 2'b00;
    comp_start   = (phase == PH_COUNT && !kick && (freq_s & lane_en) == lane_en) ? lane_en : 2'b00;
    cg_start     = (phase == PH_BUILD && (comp_done & lane_en) == lane_en) ? lane_en : 2'b00;
    busy         = (phase != PH_IDLE);
    done         = (phase == PH_DONE);
  end

  // Strobes reach enabled lanes only, and only in their own phase.
  a_lanes: assert property (@(posedge clk) disable iff (rst)
                            ((comp_start | cg_start | mem_rd_start | mem_wr) & ~lane_en) == 2'b00)
    else $error("connection_controller: strobe to a disabled lane");
  a_comp_phase: assert property (@(posedge clk) disable iff (rst)
                                 comp_start != 2'b00 |-> phase == PH_COUNT)
    else $error("connection_controller: compression started outside the count phase");
  a_write_ready: assert property (@(posedge clk) disable iff (rst)
                                  mem_wr != 2'b00 |-> in_ready)
    else $error("connection_controller: write while not ready");

endmodule

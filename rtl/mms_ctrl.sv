// mms_ctrl: sequencer of the partially parallel MMS decoder.
//
// A decoding runs as
//   LOAD : N channel samples are accepted (in_valid/in_ready handshake) and,
//          one cycle later, their quantized LLRs written to the LLR store;
//   VN   : NGV cycles, one column partition per cycle, variable-node update
//          with the check messages masked (first = 1): every edge gets g(LLR);
//   then MAX_ITER times
//   CN   : NGC cycles, one row partition per cycle, check-node update;
//   VN   : NGV cycles, variable-node update and hard decisions;
//   DONE : one cycle, done = 1, the decisions of the last VN pass are final.
// One iteration therefore takes NGC + NGV cycles, and a codeword takes
// NGV + MAX_ITER*(NGC+NGV) cycles from the last LLR write to DONE.
// Decoding for a fixed number of iterations and alternating full passes
// (flooding) follow the algorithm; the phase order, the cycle budget and the
// handshake are this design's choices.
module mms_ctrl
  import mms_pkg::*;
#(
  parameter int unsigned N        = 12,  // code length
  parameter int unsigned NGV      = 3,   // column partitions
  parameter int unsigned NGC      = 3,   // row partitions
  parameter int unsigned MAX_ITER = 10,  // decoding iterations
  localparam int unsigned NW  = $clog2(N + 1),
  localparam int unsigned AW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned GVW = (NGV > 1) ? $clog2(NGV) : 1,
  localparam int unsigned GCW = (NGC > 1) ? $clog2(NGC) : 1,
  localparam int unsigned IW  = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,   // channel sample offered
  output logic           in_ready,   // channel sample accepted when both high
  input  logic           q_valid,    // quantized LLR available this cycle
  output logic           llr_we,
  output logic [AW-1:0]  llr_waddr,
  output logic           vn_en,      // variable-node phase, partition grp_v
  output logic [GVW-1:0] grp_v,
  output logic           cn_en,      // check-node phase, partition grp_c
  output logic [GCW-1:0] grp_c,
  output logic           first,      // first VN pass: check messages masked
  output logic [IW-1:0]  iter,       // check-node passes done so far
  output logic           done,
  output dec_state_t     state
);

  logic [NW-1:0] acc_cnt;
  logic [AW-1:0] wr_cnt;

  assign in_ready  = (state == ST_IDLE) || (state == ST_LOAD && acc_cnt < NW'(N));
  assign llr_we    = q_valid && (state == ST_LOAD);
  assign llr_waddr = wr_cnt;
  assign vn_en     = (state == ST_VN);
  assign cn_en     = (state == ST_CN);
  assign done      = (state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      acc_cnt <= '0;
      wr_cnt  <= '0;
      grp_v   <= '0;
      grp_c   <= '0;
      first   <= 1'b1;
      iter    <= '0;
    end else begin
      if (in_valid && in_ready) acc_cnt <= acc_cnt + 1'b1;
      unique case (state)
        ST_IDLE: begin
          wr_cnt <= '0;
          if (in_valid) begin
            acc_cnt <= NW'(1);
            state   <= ST_LOAD;
          end
        end
        ST_LOAD: begin
          if (q_valid) begin
            if (wr_cnt == AW'(N - 1)) begin
              state <= ST_VN;
              grp_v <= '0;
              first <= 1'b1;
              iter  <= '0;
            end
            wr_cnt <= wr_cnt + 1'b1;
          end
        end
        ST_VN: begin
          if (grp_v == GVW'(NGV - 1)) begin
            grp_v <= '0;
            first <= 1'b0;
            if (iter == IW'(MAX_ITER)) state <= ST_DONE;
            else begin
              state <= ST_CN;
              grp_c <= '0;
            end
          end else begin
            grp_v <= grp_v + 1'b1;
          end
        end
        ST_CN: begin
          if (grp_c == GCW'(NGC - 1)) begin
            grp_c <= '0;
            iter  <= iter + 1'b1;
            state <= ST_VN;
          end else begin
            grp_c <= grp_c + 1'b1;
          end
        end
        ST_DONE: begin
          acc_cnt <= '0;
          state   <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A sample is never written outside LOAD, and the phases never overlap.
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n) !(vn_en && cn_en));
  a_load_only  : assert property (@(posedge clk) disable iff (!rst_n)
                                  q_valid |-> state == ST_LOAD);

endmodule

// sync_ctrl: central controller of the synchronisation subsystem.
//
// It counts the samples since start and walks through the estimation steps,
// enabling each block only while it is needed (the others sleep):
//   IDLE   -> SEARCH on start: correlator fills (L samples) and the boundary
//             search runs over SEARCH_LEN positions;
//   SEARCH -> ACC2 when the search is done: the sample whose window covers
//             the second half of the preamble (best_n + L) is correlated
//             with the second-half coefficients;
//   ACC2   -> FCFO when the second accumulation is done: the CP cross
//             correlation is enabled for samples B+N .. B+N+CP-1, where
//             B = best_n - L + 1 is the symbol boundary (CP start);
//   FCFO   -> ANGLE after the window: the accumulator is passed to CORDIC;
//   ANGLE  -> DECIDE when the angle is ready: ping-pong ICFO decision;
//   DECIDE -> TRACK when the decision is made: the NCO word is loaded.
// A new start restarts from SEARCH.  The state names and the exact sequence
// are this design's own; the steps and their order follow the algorithm.
module sync_ctrl
  import sync_pkg::*;
#(
  parameter int unsigned L  = CORR_LEN,
  parameter int unsigned N  = N_FFT,
  parameter int unsigned CP = CP_LEN,
  parameter int unsigned NW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          s_valid,       // one received sample
  input  logic          finder_done,
  input  logic [NW-1:0] best_n,
  input  logic          storage_done,
  input  logic          angle_done,
  input  logic          decide_done,
  output sync_state_e   state,
  output logic [NW-1:0] n_cnt,         // index of the sample on s_valid
  output logic          clear,         // one-cycle pulse on start
  output logic          bank_en,
  output logic          half1_en,
  output logic [NW-1:0] half1_n,
  output logic          dl_en,         // CP delay line running
  output logic          fcfo_enable,
  output logic          angle_start,
  output logic          decide_start,
  output logic          boundary_valid,
  output logic [NW-1:0] boundary
);

  logic [NW-1:0] win_lo, win_hi;
  logic [1:0]    settle;

  assign win_lo = boundary + NW'(N);
  assign win_hi = boundary + NW'(N + CP - 1);

  assign bank_en     = (state == ST_SEARCH) || (state == ST_ACC2);
  assign half1_en    = (state == ST_ACC2);
  assign dl_en       = (state == ST_SEARCH) || (state == ST_ACC2) || (state == ST_FCFO);
  assign fcfo_enable = (state == ST_FCFO) && (n_cnt >= win_lo) && (n_cnt <= win_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_IDLE;
      n_cnt          <= '0;
      clear          <= 1'b0;
      half1_n        <= '0;
      angle_start    <= 1'b0;
      decide_start   <= 1'b0;
      boundary_valid <= 1'b0;
      boundary       <= '0;
      settle         <= '0;
    end else begin
      clear        <= 1'b0;
      angle_start  <= 1'b0;
      decide_start <= 1'b0;
      if (s_valid && state != ST_IDLE && n_cnt != '1) n_cnt <= n_cnt + 1'b1;
      if (start) begin
        state          <= ST_SEARCH;
        n_cnt          <= '0;
        clear          <= 1'b1;
        boundary_valid <= 1'b0;
      end else begin
        unique case (state)
          ST_IDLE: ;
          ST_SEARCH:
            if (finder_done) begin
              state          <= ST_ACC2;
              half1_n        <= best_n + NW'(L);
              boundary       <= best_n - NW'(L - 1);
              boundary_valid <= 1'b1;
            end
          ST_ACC2:
            if (storage_done) state <= ST_FCFO;
          ST_FCFO:
            if (s_valid && n_cnt == win_hi) begin
              state  <= ST_ANGLE;
              settle <= 2'd3;
            end
          ST_ANGLE: begin
            // let the last product reach the accumulator, then start CORDIC
            if (settle != 0) begin
              settle <= settle - 1'b1;
              if (settle == 2'd1) angle_start <= 1'b1;
            end
            if (angle_done) begin
              state        <= ST_DECIDE;
              decide_start <= 1'b1;
            end
          end
          ST_DECIDE:
            if (decide_done) state <= ST_TRACK;
          ST_TRACK: ;
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

endmodule

// boundary_finder: finds the symbol boundary as the position of the largest
// correlation magnitude over NPOS consecutive positions.
//
// Every result (one per hypothesis and sample) is compared with the running
// maximum, which acts as the threshold: a larger result replaces it and its
// sample index and hypothesis are kept.  Only results of samples with index
// FIRST_N .. FIRST_N+NPOS-1 take part (the first FIRST_N samples fill
// the correlator).  The coarse ICFO is the hypothesis of the peak.
//
// Timing: new_max pulses one cycle after the last result of a sample that
// raised the maximum (it tells icfo_storage to keep that sample's results);
// done pulses one cycle after the last result of the last position, with
// best_n / best_hyp / best_mag valid from then until the next clear.
//
// Searching 200 positions for the largest correlation follows the reference
// architecture; where the search starts, the energy measure and the new_max
// strobe for the storage unit are this design's own.
module boundary_finder
  import sync_pkg::*;
#(
  parameter int unsigned NW         = 12,
  parameter int unsigned HW         = $clog2(N_HYP),
  parameter int unsigned MW         = 22,
  parameter int unsigned FIRST_N    = CORR_LEN - 1,
  parameter int unsigned NPOS       = SEARCH_LEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          res_valid,
  input  logic [HW-1:0] res_hyp,
  input  logic          res_last,
  input  logic [NW-1:0] res_n,
  input  logic [MW-1:0] res_mag,
  output logic          new_max,
  output logic          done,
  output logic [NW-1:0] best_n,
  output logic [HW-1:0] best_hyp,
  output logic [MW-1:0] best_mag
);

  logic in_window, beat, sample_beat;
  assign in_window = (32'(res_n) >= FIRST_N) && (32'(res_n) < FIRST_N + NPOS);
  assign beat      = res_valid && in_window && (res_mag > best_mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_n      <= '0;
      best_hyp    <= '0;
      best_mag    <= '0;
      sample_beat <= 1'b0;
      new_max     <= 1'b0;
      done        <= 1'b0;
    end else if (clear) begin
      best_n      <= '0;
      best_hyp    <= '0;
      best_mag    <= '0;
      sample_beat <= 1'b0;
      new_max     <= 1'b0;
      done        <= 1'b0;
    end else begin
      new_max <= 1'b0;
      done    <= 1'b0;
      if (beat) begin
        best_mag <= res_mag;
        best_n   <= res_n;
        best_hyp <= res_hyp;
      end
      if (res_valid && in_window) begin
        if (res_last) begin
          new_max     <= sample_beat || beat;
          sample_beat <= 1'b0;
          done        <= (32'(res_n) == FIRST_N + NPOS - 1);
        end else if (beat) begin
          sample_beat <= 1'b1;
        end
      end
    end
  end

endmodule

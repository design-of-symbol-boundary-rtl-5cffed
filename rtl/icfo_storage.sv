// icfo_storage: keeps the N_HYP first-half correlation magnitudes of the
// boundary candidate, adds the second-half magnitudes of the same
// hypotheses, and finds the two largest sums.
//
// The keep chain is a ring of N_HYP registers, each behind a 2:1 mux: in hold
// mode every register keeps its value, in shift mode the chain moves one
// place per result, so that the oldest entry (hypothesis k of the first
// half) leaves the chain exactly when hypothesis k of the second half
// arrives, and the adder sees matching pairs.  The two halves are combined
// by adding magnitudes.
// Because the search only knows after all N_HYP results of a sample whether
// that sample is the new maximum, the results first pass a candidate chain
// that always shifts; on capture the keep chain copies it in parallel.  The
// candidate chain and the parallel copy are this design's own addition.
//
// Timing: capture one cycle after the last result of a sample copies that
// sample.  Results with acc high are accumulated; done pulses one cycle
// after the one with last high, and max1/max2 with their hypotheses stay
// valid until the next clear.
module icfo_storage
  import sync_pkg::*;
#(
  parameter int unsigned NH = N_HYP,
  parameter int unsigned HW = $clog2(NH),
  parameter int unsigned MW = 22,
  parameter int unsigned SW = MW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          res_valid,
  input  logic [HW-1:0] res_hyp,
  input  logic          res_last,
  input  logic [MW-1:0] res_mag,
  input  logic          capture,   // copy candidate chain into keep chain
  input  logic          acc,       // this result belongs to the second half
  output logic          done,
  output logic [SW-1:0] max1,
  output logic [HW-1:0] hyp1,
  output logic [SW-1:0] max2,
  output logic [HW-1:0] hyp2
);

  logic [MW-1:0] cand [NH];
  logic [MW-1:0] keep [NH];
  logic [SW-1:0] sum;
  logic          acc_now;

  assign acc_now = res_valid && acc;
  assign sum     = SW'(res_mag) + SW'(keep[NH-1]);

  // candidate chain: always shifting results in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NH; i++) cand[i] <= '0;
    end else if (res_valid && !acc) begin
      cand[0] <= res_mag;
      for (int i = 1; i < NH; i++) cand[i] <= cand[i-1];
    end
  end

  // keep chain: hold, shift or parallel copy
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NH; i++) keep[i] <= '0;
    end else if (capture) begin
      for (int i = 0; i < NH; i++) keep[i] <= cand[i];
    end else if (acc_now) begin
      keep[0] <= res_mag;
      for (int i = 1; i < NH; i++) keep[i] <= keep[i-1];
    end
  end

  // find the two largest sums
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max1 <= '0; hyp1 <= '0; max2 <= '0; hyp2 <= '0; done <= 1'b0;
    end else if (clear) begin
      max1 <= '0; hyp1 <= '0; max2 <= '0; hyp2 <= '0; done <= 1'b0;
    end else begin
      done <= acc_now && res_last;
      if (acc_now) begin
        if (res_hyp == '0) begin
          max1 <= sum; hyp1 <= res_hyp; max2 <= '0; hyp2 <= res_hyp;
        end else if (sum > max1) begin
          max2 <= max1; hyp2 <= hyp1; max1 <= sum; hyp1 <= res_hyp;
        end else if (sum > max2) begin
          max2 <= sum; hyp2 <= res_hyp;
        end
      end
    end
  end

endmodule

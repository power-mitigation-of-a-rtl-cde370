// fcs_engine: feedback control system that equalizes the execution times
// of the CGRA nodes by frequency (and voltage) scaling.
//
// Each CGRA node reports the system-clock cycles of its last job
// (counts[i], valid when done[i] pulses).  When every node has reported
// once since the last decision, one iteration is complete and the engine
// decides:
//  * first iteration after reset, or after 'retarget' (the CGRAs were
//    given new tasks): the node with the largest count becomes the
//    worst-case node; frequencies are left alone;
//  * later iterations: the target is the worst-case node's latest count.
//    Every other node whose count is below the equalization region
//    [target - target/2^MARGIN_SHIFT, target] gets its 4-bit frequency
//    code decreased by one (not below 0); one whose count exceeds the
//    target gets it increased by one (not above 15).  The worst-case node
//    stays at code 15.
// The new codes (and the DVFS mode bit) are written to the PMU register
// in one write.  With 'enable' low nothing is written (FCS inactive: the
// PMU keeps its start-up codes, the highest frequency).
//
// Timing: runs on the system clock enable; the decision and the PMU write
// happen one enabled clock after the last report of an iteration.
// Following the document: worst-case selection in the first iteration,
// one-step (+/-"0001") updates per iteration, the worst node left at the
// top frequency, and the automatic retargeting.  In the document this
// runs as software on the RISC cores; here it is hardware.  The width of
// the equalization region is this design's choice.
module fcs_engine #(
  parameter int unsigned N            = 4,
  parameter int unsigned MARGIN_SHIFT = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              enable,
  input  logic              retarget,
  input  logic              dvfs,
  input  logic [N-1:0]      done,
  input  logic [N-1:0][31:0] counts,
  output logic              wr_en,
  output logic [31:0]       wr_data,
  output logic [$clog2(N)-1:0] worst,
  output logic [31:0]       target,
  output logic [15:0]       iterations,
  output logic [N-1:0][3:0] codes,
  output logic [N-1:0]      in_region
);

  logic [N-1:0] seen;
  logic         have_target, retgt_pend;
  logic         eval;

  assign eval = &(seen | done);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_region[i] = (counts[i] <= target) &&
                     (counts[i] + (target >> MARGIN_SHIFT) >= target);
    end
  end

  // worst-case search and the next codes, from the latest counts
  logic [31:0]       mx, t;
  int                wi;
  logic [N-1:0][3:0] nc;

  always_comb begin
    mx = counts[0];
    wi = 0;
    for (int i = 1; i < N; i++) begin
      if (counts[i] > mx) begin
        mx = counts[i];
        wi = i;
      end
    end
    t  = counts[worst];
    nc = codes;
    for (int i = 0; i < N; i++) begin
      if (i == int'(worst)) begin
        nc[i] = 4'hF;
      end else if (counts[i] + (t >> MARGIN_SHIFT) < t) begin
        if (nc[i] != 4'd0) nc[i] = nc[i] - 4'd1;
      end else if (counts[i] > t) begin
        if (nc[i] != 4'hF) nc[i] = nc[i] + 4'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen        <= '0;
      have_target <= 1'b0;
      retgt_pend  <= 1'b0;
      worst       <= '0;
      target      <= '0;
      iterations  <= '0;
      codes       <= {N{4'hF}};
      wr_en       <= 1'b0;
      wr_data     <= '0;
    end else if (ce) begin
      wr_en <= 1'b0;
      if (retarget) retgt_pend <= 1'b1;
      if (!enable) begin
        seen <= '0;
      end else if (eval) begin
        seen       <= '0;
        iterations <= iterations + 1'b1;
        if (!have_target || retgt_pend || retarget) begin
          worst       <= ($clog2(N))'(wi);
          target      <= mx;
          have_target <= 1'b1;
          retgt_pend  <= 1'b0;
        end else begin
          target  <= t;
          codes   <= nc;
          wr_en   <= 1'b1;
          wr_data <= 32'({dvfs, nc});
        end
      end else begin
        seen <= seen | done;
      end
    end
  end

endmodule

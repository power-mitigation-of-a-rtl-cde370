// pmu: power management unit for the CGRA nodes (emulating a DVFS PMU).
//
// One 32-bit register, written by the feedback controller or over the
// NoC.  Bits [4i+3:4i] are the frequency code of CGRA i (16 codes,
// code 15 = highest frequency); bit 16 selects DVFS mode.  The reset value
// puts every CGRA at code 15, the highest frequency, as at system start-up.
//
// When a core's field, or the supply it needs, changes, the PMU gates that
// core's clock (gate[i] = 1), applies the new code and voltage code,
// waits for the clock generator (F_SETTLE clocks) or, in DVFS mode, for
// the supply (V_SETTLE clocks), and then releases the gate.  The core is
// thus never clocked during a transition and resumes where it stopped.
// In DFS mode the voltage code stays at nominal (1.0 V); in DVFS mode it
// is the lowest of 0.5..1.0 V whose maximum frequency covers the selected
// one (harp_pkg::mhz2vsel).  vsel = 0..5 means 0.5 V + 0.1 V * vsel.
//
// Timing: runs on the base clock; a transition takes 2 + settle clocks.
// Following the document: the 32-bit register with a 4-bit field per
// core (16 bits for four cores), voltage selection in DVFS mode and the
// clock gating during transitions.  Bit 16, the settle times and the
// transition sequence are this design's choice.
module pmu
  import harp_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned F_MIN_MHZ  = 35,
  parameter int unsigned F_STEP_MHZ = 11,
  parameter int unsigned F_SETTLE   = 16,
  parameter int unsigned V_SETTLE   = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [31:0]      wr_data,
  output logic [31:0]      pmu_reg,
  output logic [N-1:0][3:0] freq_code,   // applied frequency codes
  output logic [N-1:0][2:0] vsel,        // applied voltage codes
  output logic [N-1:0]     gate,         // 1: core clock stopped
  output logic             busy
);

  localparam logic [31:0] RST_VAL = 32'(({N{4'hF}}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pmu_reg <= RST_VAL;
    else if (wr_en) pmu_reg <= wr_data;
  end

  wire dvfs = pmu_reg[16];

  typedef enum logic [1:0] {T_IDLE, T_GATE, T_SETTLE} tst_e;

  for (genvar i = 0; i < int'(N); i++) begin : g_core
    tst_e        st;
    logic [7:0]  cnt;
    logic [3:0]  tgt_code;
    logic [2:0]  tgt_v;

    assign tgt_code = pmu_reg[4*i +: 4];
    assign tgt_v    = dvfs ? mhz2vsel(10'(code2mhz(tgt_code, F_MIN_MHZ, F_STEP_MHZ))) : 3'd5;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st           <= T_IDLE;
        cnt          <= '0;
        freq_code[i] <= 4'hF;
        vsel[i]      <= 3'd5;
        gate[i]      <= 1'b0;
      end else begin
        unique case (st)
          T_IDLE: if (tgt_code != freq_code[i] || tgt_v != vsel[i]) begin
            gate[i] <= 1'b1;
            st      <= T_GATE;
          end
          T_GATE: begin
            freq_code[i] <= tgt_code;
            vsel[i]      <= tgt_v;
            cnt          <= 8'(dvfs ? V_SETTLE : F_SETTLE);
            st           <= T_SETTLE;
          end
          default: begin
            if (cnt == 8'd0) begin
              gate[i] <= 1'b0;
              st      <= T_IDLE;
            end else begin
              cnt <= cnt - 1'b1;
            end
          end
        endcase
      end
    end
  end

  assign busy = |gate;

endmodule

// rpe: reconfigurable processing element of the template-based CGRA.
//
// Two operand registers (IN1, IN2) capture their inputs on every enabled
// clock; the configuration word (pe_cfg_t) is decoded into the functional
// unit select.  Functional units: adder/subtractor, 32x32 multiplier (low
// word), shifter (left, logical right, arithmetic right by operand 2[4:0]),
// a bitwise 2-input LUT driven by a 4-bit truth table, the immediate
// register and a single-precision floating-point adder and multiplier.
// The operand 2 multiplexer chooses between the operand 2 register and the
// immediate.  The result multiplexer drives OUT1; OUT2 is the operand 2
// register, so a PE can forward its second operand to the next row.
//
// Timing: one register stage (the operand registers); OUT1/OUT2 are
// combinational from them.  'en' is the row-valid of the pipeline: the
// operand registers hold while it is low.  'clr' zeroes them (start of a
// context run) so loop accumulations start from 0.
//
// Following the document: the operand registers, the set of units and
// OUT1/OUT2.  This design's choices: the opcode encoding, the LUT as a
// bitwise truth table, and the floating-point units, which flush
// subnormals to zero, truncate instead of rounding and do not produce NaN.
module rpe
  import harp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,     // clock enable of the CGRA clock domain
  input  logic          en,     // row valid: load operand registers
  input  logic          clr,    // clear operand registers
  input  pe_cfg_t       cfg,
  input  logic [DW-1:0] in1,
  input  logic [DW-1:0] in2,
  output logic [DW-1:0] out1,
  output logic [DW-1:0] out2
);

  logic [DW-1:0] op1_q, op2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op1_q <= '0;
      op2_q <= '0;
    end else if (ce) begin
      if (clr) begin
        op1_q <= '0;
        op2_q <= '0;
      end else if (en) begin
        op1_q <= in1;
        op2_q <= in2;
      end
    end
  end

  // ------------------------------------------------------------ FP units
  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [47:0] p;
    logic [9:0]  e;
    logic [22:0] m;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 10'(a[30:23]) + 10'(b[30:23]) - 10'd127;
    if (p[47]) begin
      m = p[46:24];
      e = e + 10'd1;
    end else begin
      m = p[45:23];
    end
    if ($signed(e) <= 0)  return {s, 31'd0};
    if (e >= 10'd255)     return {s, 8'hFF, 23'd0};
    return {s, e[7:0], m};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic [7:0]  d;
    logic [25:0] mx, my, r;
    logic [9:0]  e;
    int          lz;
    // order by magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    if (x[30:23] == 8'd0) return 32'd0;
    if (y[30:23] == 8'd0) return x;
    d  = x[30:23] - y[30:23];
    mx = {2'b01, x[22:0], 1'b0};
    my = (d > 8'd25) ? 26'd0 : ({2'b01, y[22:0], 1'b0} >> d);
    e  = 10'(x[30:23]);
    if (x[31] == y[31]) begin
      r = mx + my;
      if (r[25]) begin
        r = r >> 1;
        e = e + 10'd1;
      end
    end else begin
      r = mx - my;
      if (r == 26'd0) return 32'd0;
      lz = 0;
      for (int i = 24; i >= 0; i--) begin
        if (r[i]) break;
        lz++;
      end
      r = r << lz;
      e = e - 10'(lz);
    end
    if ($signed(e) <= 0) return {x[31], 31'd0};
    if (e >= 10'd255)    return {x[31], 8'hFF, 23'd0};
    return {x[31], e[7:0], r[23:1]};
  endfunction

  // ------------------------------------------------------- result mux
  logic [DW-1:0] imm_q, opb;
  logic [63:0]   prod;

  assign imm_q = {{16{cfg.imm[15]}}, cfg.imm};   // immediate register
  assign opb   = cfg.use_imm ? imm_q : op2_q;     // operand 2 mux
  assign prod  = 64'(op1_q) * 64'(opb);
  assign out2  = op2_q;

  always_comb begin
    unique case (cfg.op)
      OP_PASS: out1 = op1_q;
      OP_ADD:  out1 = op1_q + opb;
      OP_SUB:  out1 = op1_q - opb;
      OP_MUL:  out1 = prod[31:0];
      OP_SHL:  out1 = op1_q << opb[4:0];
      OP_SHR:  out1 = op1_q >> opb[4:0];
      OP_SRA:  out1 = DW'($signed(op1_q) >>> opb[4:0]);
      OP_LUT:  for (int i = 0; i < DW; i++) out1[i] = cfg.lut[{op1_q[i], opb[i]}];
      OP_IMM:  out1 = imm_q;
      OP_FADD: out1 = fadd(op1_q, opb);
      OP_FMUL: out1 = fmul(op1_q, opb);
      default: out1 = '0;
    endcase
  end

endmodule

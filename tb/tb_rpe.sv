// tb_rpe: self-checking test of the processing element.
// Random operands through every integer operation (with and without the
// immediate), directed IEEE-754 add/multiply cases, operand hold with
// en=0 and clear.  Expected values are computed here from the operation
// definitions.
module tb_rpe;
  import harp_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, en = 0, clr = 0;
  pe_cfg_t cfg;
  logic [31:0] in1, in2, out1, out2;
  int checks = 0, failures = 0;

  rpe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(pe_cfg_t c, logic [31:0] a, logic [31:0] b0);
    logic [31:0] b, r;
    b = c.use_imm ? {{16{c.imm[15]}}, c.imm} : b0;
    case (c.op)
      OP_PASS: r = a;
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_MUL:  r = a * b;
      OP_SHL:  r = a << b[4:0];
      OP_SHR:  r = a >> b[4:0];
      OP_SRA:  r = $signed(a) >>> b[4:0];
      OP_LUT:  for (int i = 0; i < 32; i++) r[i] = c.lut[{a[i], b[i]}];
      OP_IMM:  r = {{16{c.imm[15]}}, c.imm};
      default: r = 0;
    endcase
    return r;
  endfunction

  task automatic apply(pe_cfg_t c, logic [31:0] a, logic [31:0] b, logic [31:0] exp);
    cfg = c; in1 = a; in2 = b; en = 1;
    @(posedge clk); #1;
    checks++;
    if (out1 !== exp || out2 !== b) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h out1=%h exp=%h out2=%h", c.op, a, b, out1, exp, out2);
    end
  endtask

  initial begin
    cfg = '0; in1 = 0; in2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      pe_cfg_t c;
      logic [31:0] a, b;
      c = pe_cfg_t'($urandom);
      c.op = pe_op_e'($urandom_range(0, 8));
      a = $urandom; b = $urandom;
      apply(c, a, b, model(c, a, b));
    end
    // floating point: 1.5*2.0=3.0, 3.0+(-1.0)=2.0, 1.0+2.0=3.0, 0.5*0.5=0.25, x*0=0
    begin
      pe_cfg_t c;
      c = '0;
      c.op = OP_FMUL; apply(c, 32'h3FC00000, 32'h40000000, 32'h40400000);
      c.op = OP_FMUL; apply(c, 32'h3F000000, 32'h3F000000, 32'h3E800000);
      c.op = OP_FMUL; apply(c, 32'hC0400000, 32'h00000000, 32'h80000000);
      c.op = OP_FADD; apply(c, 32'h40400000, 32'hBF800000, 32'h40000000);
      c.op = OP_FADD; apply(c, 32'h3F800000, 32'h40000000, 32'h40400000);
      c.op = OP_FADD; apply(c, 32'h3F800000, 32'hBF800000, 32'h00000000);
      c.op = OP_FADD; apply(c, 32'hC1200000, 32'h40A00000, 32'hC0A00000); // -10+5=-5
    end
    // hold with en=0
    begin
      pe_cfg_t c;
      c = '0; c.op = OP_ADD;
      apply(c, 32'd7, 32'd9, 32'd16);
      en = 0; in1 = 32'd100; in2 = 32'd200;
      @(posedge clk); #1;
      checks++;
      if (out1 !== 32'd16) begin failures++; $display("FAIL hold"); end
      clr = 1;
      @(posedge clk); #1;
      clr = 0;
      checks++;
      if (out1 !== 32'd0 || out2 !== 32'd0) begin failures++; $display("FAIL clr"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe_array: self-checking test of the PE array interconnect.
// A 3 x 5 array gets random configuration words that use all eight
// operand sources (neighbours above, diagonals, OUT2 line, horizontal,
// loop, interleaved, global) and the integer operations, random input
// buffer words, random row-valid bits, random clock-enable gaps and an
// occasional clear.  A cycle model of the array kept here (operand
// registers per PE, results recomputed from the source definitions)
// predicts the last-row outputs after every clock; they are compared
// with the array's 2*COLS output words.  Configurations change every 40
// clocks.  Floating-point operations are left to the PE's own test.
module tb_pe_array;
  import harp_pkg::*;

  localparam int R = 3, C = 5;

  logic clk = 0, rst_n = 0, ce = 0, clr = 0;
  logic [R-1:0] vld = '0;
  pe_cfg_t [R-1:0][C-1:0] cfg;
  logic [2*C-1:0][31:0] bin, bout;

  pe_array #(.ROWS(R), .COLS(C)) dut (
    .clk, .rst_n, .ce, .clr, .vld, .cfg, .bin, .bout);

  int checks = 0, failures = 0;
  int src_used [8];

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state: operand registers of every PE
  logic [31:0] a_q [R][C];
  logic [31:0] b_q [R][C];

  function automatic logic [31:0] res(int r, int c);
    logic [31:0] b, y;
    pe_cfg_t k;
    k = cfg[r][c];
    b = k.use_imm ? {{16{k.imm[15]}}, k.imm} : b_q[r][c];
    case (k.op)
      OP_PASS: y = a_q[r][c];
      OP_ADD:  y = a_q[r][c] + b;
      OP_SUB:  y = a_q[r][c] - b;
      OP_MUL:  y = a_q[r][c] * b;
      OP_SHL:  y = a_q[r][c] << b[4:0];
      OP_SHR:  y = a_q[r][c] >> b[4:0];
      OP_SRA:  y = $signed(a_q[r][c]) >>> b[4:0];
      OP_LUT:  for (int i = 0; i < 32; i++) y[i] = k.lut[{a_q[r][c][i], b[i]}];
      default: y = {{16{k.imm[15]}}, k.imm};
    endcase
    return y;
  endfunction

  // value seen by operand 'which' (0: operand 1, 1: operand 2) of PE (r,c)
  function automatic logic [31:0] src_val(int r, int c, pe_src_e s, int which);
    case (s)
      S_UP:      return (r == 0) ? bin[2*c] : res(r-1, c);
      S_UP2:     return (r == 0) ? bin[2*c+1] : b_q[r-1][c];
      S_UPLEFT:  return (c == 0) ? 32'd0 : (r == 0) ? bin[2*(c-1)] : res(r-1, c-1);
      S_UPRIGHT: return (c == C-1) ? 32'd0 : (r == 0) ? bin[2*(c+1)] : res(r-1, c+1);
      S_LEFT:    return (c == 0) ? 32'd0 : res(r, c-1);
      S_LOOP:    return res(r, c);
      S_ILV:     return (r < 2) ? bin[2*c] : res(r-2, c);
      default:   return bin[2*c+which];
    endcase
  endfunction

  function automatic pe_cfg_t rand_cfg();
    pe_cfg_t k;
    k = pe_cfg_t'($urandom);
    k.op   = pe_op_e'($urandom_range(0, 8));
    k.src1 = pe_src_e'($urandom_range(0, 7));
    k.src2 = pe_src_e'($urandom_range(0, 7));
    k.use_imm = ($urandom_range(0, 3) == 0);
    src_used[k.src1]++;
    src_used[k.src2]++;
    return k;
  endfunction

  task automatic step();
    logic [31:0] na [R][C];
    logic [31:0] nb [R][C];
    // next model state from the values before the edge
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        na[r][c] = a_q[r][c];
        nb[r][c] = b_q[r][c];
        if (ce) begin
          if (clr) begin
            na[r][c] = '0;
            nb[r][c] = '0;
          end else if (vld[r]) begin
            na[r][c] = src_val(r, c, cfg[r][c].src1, 0);
            nb[r][c] = src_val(r, c, cfg[r][c].src2, 1);
          end
        end
      end
    @(posedge clk);
    a_q = na;
    b_q = nb;
    #1;
    for (int c = 0; c < C; c++) begin
      checks += 2;
      if (bout[2*c] !== res(R-1, c)) begin
        failures++;
        if (failures < 10) $display("FAIL out1 col %0d: %h expected %h", c, bout[2*c], res(R-1, c));
      end
      if (bout[2*c+1] !== b_q[R-1][c]) begin
        failures++;
        if (failures < 10) $display("FAIL out2 col %0d: %h expected %h", c, bout[2*c+1], b_q[R-1][c]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        a_q[r][c] = '0;
        b_q[r][c] = '0;
        cfg[r][c] = '0;
      end
    bin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 40 == 0)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) cfg[r][c] = rand_cfg();
      for (int i = 0; i < 2*C; i++) bin[i] = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      ce  = ($urandom_range(0, 4) != 0);
      vld = R'($urandom);
      if ($urandom_range(0, 7) == 0) vld = '1;
      clr = ($urandom_range(0, 60) == 0);
      step();
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (src_used[s] == 0) begin
        failures++;
        $display("FAIL source %0d never configured", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

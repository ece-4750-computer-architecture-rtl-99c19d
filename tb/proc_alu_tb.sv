// proc_alu_tb: self-checking test of the ALU.
//
// Applies corner operands (0, 1, -1, the extreme signed values, shift
// amounts 0, 1 and 31) and random operands to every function and compares
// with results computed here another way: signed less-than by the sign of
// a 33-bit difference, arithmetic right shift by shifting a 64-bit
// sign-extended value, nor and subtraction from their definitions. Also
// checks the three branch-condition outputs.
module proc_alu_tb;
  import parc_pkg::*;

  logic [31:0] in0, in1, out;
  alu_fn_e     fn;
  logic        ops_eq, op0_zero, op0_neg;

  proc_alu dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [31:0] model(alu_fn_e f, logic [31:0] a, logic [31:0] b);
    logic [32:0] d;
    logic [63:0] sx;
    case (f)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a + ~b + 32'd1;
      ALU_AND:  return a & b;
      ALU_OR:   return a | b;
      ALU_XOR:  return (a | b) & ~(a & b);
      ALU_NOR:  return ~a & ~b;
      ALU_SLT:  begin d = {a[31], a} - {b[31], b}; return {31'd0, d[32]}; end
      ALU_SLTU: begin d = {1'b0, a} - {1'b0, b};   return {31'd0, d[32]}; end
      ALU_SLL:  return b * (32'd1 << a[4:0]);
      ALU_SRL:  return b / (32'd1 << a[4:0]);
      ALU_SRA:  begin sx = {{32{b[31]}}, b} >> a[4:0]; return sx[31:0]; end
      ALU_CP0:  return a;
      ALU_CP1:  return b;
      default:  return 32'hx;
    endcase
  endfunction

  task automatic apply(alu_fn_e f, logic [31:0] a, logic [31:0] b);
    fn = f; in0 = a; in1 = b;
    #1;
    checks++;
    if (out !== model(f, a, b) || ops_eq !== (a == b) || op0_zero !== (a == 0) || op0_neg !== a[31]) begin
      failures++;
      $display("FAIL: fn=%s a=%h b=%h out=%h expected %h", f.name(), a, b, out, model(f, a, b));
    end
  endtask

  logic [31:0] corner [8] = '{32'd0, 32'd1, 32'hffff_ffff, 32'h7fff_ffff,
                              32'h8000_0000, 32'd31, 32'hffff_fff0, 32'h0000_0010};

  initial begin
    fork
      begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int f = 0; f <= int'(ALU_CP1); f++) begin
      foreach (corner[i]) foreach (corner[j]) apply(alu_fn_e'(f), corner[i], corner[j]);
      repeat (200) apply(alu_fn_e'(f), $urandom(), $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

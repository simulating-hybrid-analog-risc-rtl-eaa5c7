// tb_rocc_pkg: helpers shared by the coprocessor testbenches: building RoCC
// commands for the five MVM instructions and turning small integers into the
// binary64 words the arrays work on.
package tb_rocc_pkg;
  import mvm_pkg::*;

  // RoCC custom-0 major opcode, the usual home of a first accelerator.
  localparam logic [6:0] OPCODE_CUSTOM0 = 7'b0001011;

  function automatic rocc_cmd_t mk_cmd(logic [6:0] funct7, logic [XLEN-1:0] rs1,
                                       logic [XLEN-1:0] rs2, logic xd, logic [4:0] rd);
    rocc_cmd_t c;
    c.inst.funct7 = funct7;
    c.inst.rs2    = 5'd11;
    c.inst.rs1    = 5'd10;
    c.inst.xd     = xd;
    c.inst.xs1    = 1'b1;
    c.inst.xs2    = 1'b1;
    c.inst.rd     = rd;
    c.inst.opcode = OPCODE_CUSTOM0;
    c.rs1         = rs1;
    c.rs2         = rs2;
    return c;
  endfunction

  function automatic logic [63:0] f64(int v);
    return $realtobits(real'(v));
  endfunction
endpackage

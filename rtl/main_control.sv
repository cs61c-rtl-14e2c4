// main_control: the single-cycle CPU's controller, a two-level AND/OR decoder.
//
// The "AND" plane turns the 6-bit op and func fields into one product term per
// instruction (add, sub, ori, lw, sw, beq, jump): each term is the AND of all
// six op bits, true or complemented, and for add/sub also of the six func
// bits. The "OR" plane forms every control signal as the OR of the terms of
// the instructions that assert it, so the circuit is a programmable logic
// array. The equations and the op/func encodings follow the controller truth
// table; a don't-care entry is 0 here because each output is the OR of only
// the terms that need it. An op/func pair matching no term asserts no signal,
// so it writes neither a register nor memory and the PC advances by 4 (this
// design's choice). Purely combinational, no clock.
//
// Ports: op = instruction<31:26>, func = instruction<5:0>; ctrl = control
// points (see cpu_pkg::ctrl_t).
module main_control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);

  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  // AND plane: one product term per instruction.
  always_comb begin
    rtype  = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    i_ori  = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    i_lw   =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    i_sw   =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    i_beq  = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    i_jump = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    i_add  = rtype & func[5] & ~func[4] & ~func[3] & ~func[2] & ~func[1] & ~func[0];
    i_sub  = rtype & func[5] & ~func[4] & ~func[3] & ~func[2] &  func[1] & ~func[0];
  end

  // OR plane: each control signal is the OR of the terms that assert it.
  always_comb begin
    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_wr     = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_wr     = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = i_lw | i_sw;
    ctrl.alu_ctr    = alu_ctr_e'({i_ori, i_sub | i_beq});
  end

  // The product terms match the named encodings of cpu_pkg, and at most one
  // instruction term is true for any op/func pair.
  always_comb begin
    assert final (rtype == (op == OP_RTYPE) && i_ori == (op == OP_ORI) &&
                  i_lw == (op == OP_LW) && i_sw == (op == OP_SW) &&
                  i_beq == (op == OP_BEQ) && i_jump == (op == OP_J) &&
                  i_add == (rtype && func == FUNC_ADD) &&
                  i_sub == (rtype && func == FUNC_SUB))
      else $error("main_control: product terms disagree with the opcode table");
    assert final ($countones({i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump}) <= 1)
      else $error("main_control: more than one instruction decoded");
  end

endmodule

// func_unit: one DISVLIW functional unit (FU) with its execute (EX) and
// write-back (WB) stages.
//
// An instruction enters EX the cycle after its scheduler issues it, with its
// operands already read. Integer operations (ALU, loads, stores, branches)
// take one EX cycle, as in the document's Table 1. A unit built with
// IS_LONG=1 runs the long-latency operations instead: IEEE double FADD/FSUB
// in FADD_LAT cycles and FMUL in FMUL_LAT cycles (datapath in fpu_dp, result
// held until the last cycle), integer MUL in MUL_LAT cycles, and 32-bit
// DIVU/REMU in 32 cycles with a radix-2 restoring divider, all inside the
// document's 1 to 32 cycle range for floating-point instructions. The unit is
// not pipelined: a new instruction may be issued only in the last EX cycle of
// the previous one (`ready`).
//
// In the last EX cycle the unit announces completion: it raises `ann_valid`
// with the instruction's dpost vector, and the top increments the matching
// counters in the other units' DCs. The result is also offered in that cycle
// (`fwd_*`) so that the next instruction of the same unit, which carries no
// dependency bits for it, can pick it up. One cycle later the result is in
// WB (`wb_*`) and is written to the register file.
//
// The document gives the floating-point units and their latency range but
// not their operations or exact latencies; the operation set, the latencies
// and the integer multiply/divide are this design's choices. Branches
// resolve in EX and report the outcome on `br_*`. `mispredict` kills a
// speculative instruction in EX or WB; `commit` makes it non-speculative.
module func_unit
  import disvliw_pkg::*;
#(
  parameter bit          IS_LONG = 1'b0,
  parameter int unsigned MUL_LAT  = 4,
  parameter int unsigned FADD_LAT = 4,
  parameter int unsigned FMUL_LAT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue from the dynamic scheduler
  input  logic             issue,
  input  iq_entry_t        entry,
  input  logic [XLEN-1:0]  opa,       // R[rs1]
  input  logic [XLEN-1:0]  opb,       // R[src2]
  output logic             ready,
  output logic             busy,
  // speculation control
  input  logic             commit,
  input  logic             mispredict,
  // announcement (last EX cycle)
  output logic             ann_valid,
  output logic [DEP_W-1:0] ann_dpost,
  output logic             ann_spec,
  // same-unit forwarding (last EX cycle)
  output logic             fwd_valid,
  output logic [4:0]       fwd_rd,
  output logic [XLEN-1:0]  fwd_data,
  // write back
  output logic             wb_valid,
  output logic [4:0]       wb_rd,
  output logic [XLEN-1:0]  wb_data,
  output logic             wb_spec,
  // data memory
  output logic             mem_we,
  output logic [XLEN-1:0]  mem_addr,
  output logic [XLEN-1:0]  mem_wdata,
  input  logic [XLEN-1:0]  mem_rdata,
  // branch resolution
  output logic             br_valid,
  output logic             br_taken,
  output logic [PC_W-1:0]  br_target
);
  logic             ex_valid, ex_spec;
  instr_t           ex_ins;
  logic [DEP_W-1:0] ex_dpost;
  logic [XLEN-1:0]  ex_a, ex_b;
  logic [5:0]       ex_left;           // EX cycles still to run, including this one
  logic [31:0]      div_rem, div_quo;  // restoring divider state (32-bit)
  logic [XLEN-1:0]  result;
  logic             ex_final, ex_kill;
  logic [XLEN-1:0]  imm_s;
  logic [32:0]      rem_shift;
  logic [31:0]      rem_next, quo_next;
  logic [1:0]       fp_op;
  logic [XLEN-1:0]  fp_y;

  assign fp_op = (ex_ins.op == OP_FMUL) ? 2'd2 : (ex_ins.op == OP_FSUB) ? 2'd1 : 2'd0;

  fpu_dp u_fpu (.op(fp_op), .a(ex_a), .b(ex_b), .y(fp_y));

  assign imm_s    = {{(XLEN-16){ex_ins.lo[15]}}, ex_ins.lo};
  assign ex_final = ex_valid && ex_left == 6'd1;
  assign ex_kill  = mispredict && ex_spec;
  assign busy     = ex_valid;
  assign ready    = !ex_valid || ex_final;

  // one step of restoring division on the low 32 bits of the operands
  always_comb begin
    rem_shift = {div_rem, div_quo[31]};
    if (rem_shift >= {1'b0, ex_b[31:0]}) begin
      rem_next = 32'(rem_shift - {1'b0, ex_b[31:0]});
      quo_next = {div_quo[30:0], 1'b1};
    end else begin
      rem_next = rem_shift[31:0];
      quo_next = {div_quo[30:0], 1'b0};
    end
  end

  always_comb begin
    unique case (ex_ins.op)
      OP_ADD:  result = ex_a + ex_b;
      OP_SUB:  result = ex_a - ex_b;
      OP_AND:  result = ex_a & ex_b;
      OP_OR:   result = ex_a | ex_b;
      OP_XOR:  result = ex_a ^ ex_b;
      OP_SLT:  result = {{(XLEN-1){1'b0}}, $signed(ex_a) < $signed(ex_b)};
      OP_SLL:  result = ex_a << ex_b[5:0];
      OP_SRL:  result = ex_a >> ex_b[5:0];
      OP_ADDI: result = ex_a + imm_s;
      OP_LUI:  result = XLEN'({ex_ins.lo, 16'h0});
      OP_LW:   result = mem_rdata;
      OP_MUL:  result = ex_a * ex_b;
      OP_DIVU: result = XLEN'(quo_next);
      OP_REMU: result = XLEN'(rem_next);
      OP_FADD, OP_FSUB, OP_FMUL: result = fp_y;
      default: result = '0;
    endcase
  end

  function automatic logic [5:0] latency(op_e op);
    case (op)
      OP_MUL:           return 6'(MUL_LAT);
      OP_FADD, OP_FSUB: return 6'(FADD_LAT);
      OP_FMUL:          return 6'(FMUL_LAT);
      OP_DIVU, OP_REMU: return 6'd32;
      default:          return 6'd1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_spec  <= 1'b0;
      ex_ins   <= '0;
      ex_dpost <= '0;
      ex_a     <= '0;
      ex_b     <= '0;
      ex_left  <= '0;
      div_rem  <= '0;
      div_quo  <= '0;
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
      wb_spec  <= 1'b0;
    end else begin
      // EX stage
      if (issue && !(mispredict && entry.spec)) begin
        ex_valid <= 1'b1;
        ex_spec  <= entry.spec && !commit;
        ex_ins   <= entry.slot.ins;
        ex_dpost <= entry.slot.dpost;
        ex_a     <= opa;
        ex_b     <= opb;
        ex_left  <= latency(entry.slot.ins.op);
        div_rem  <= '0;
        div_quo  <= opa[31:0];
      end else if (ex_kill || ex_final) begin
        ex_valid <= 1'b0;
      end else if (ex_valid) begin
        ex_left  <= ex_left - 1'b1;
        ex_spec  <= ex_spec && !commit;
        div_rem  <= rem_next;
        div_quo  <= quo_next;
      end
      // WB stage
      wb_valid <= ex_final && !ex_kill && writes_rd(ex_ins.op) && ex_ins.rd != 5'd0;
      wb_rd    <= ex_ins.rd;
      wb_data  <= result;
      wb_spec  <= ex_spec && !commit;
    end
  end

  assign ann_valid = ex_final && !ex_kill;
  assign ann_dpost = ex_dpost;
  assign ann_spec  = ex_spec;

  assign fwd_valid = ex_final && !ex_kill && writes_rd(ex_ins.op) && ex_ins.rd != 5'd0;
  assign fwd_rd    = ex_ins.rd;
  assign fwd_data  = result;

  assign mem_we    = ex_final && !ex_spec && ex_ins.op == OP_SW;
  assign mem_addr  = ex_a + imm_s;
  assign mem_wdata = ex_b;

  assign br_valid  = ex_final && is_branch(ex_ins.op);  // branches are never speculative
  assign br_taken  = (ex_ins.op == OP_JMP) ||
                     (ex_ins.op == OP_BEQ && ex_a == ex_b) ||
                     (ex_ins.op == OP_BNE && ex_a != ex_b);
  assign br_target = ex_ins.lo[PC_W-1:0];

  // operation class must match the unit
  a_unit_class: assert property (@(posedge clk) disable iff (!rst_n)
                  issue |-> (is_long_op(entry.slot.ins.op) == IS_LONG));
  a_branch_nonspec: assert property (@(posedge clk) disable iff (!rst_n)
                      issue && is_branch(entry.slot.ins.op) |-> !entry.spec);
  a_issue_free: assert property (@(posedge clk) disable iff (!rst_n) issue |-> ready);
endmodule

// tb_func_unit: directed-random test of an integer unit and a long-latency
// unit.
//
// For each random operation the testbench issues it, counts the cycles to
// the announcement (expected: 1 for integer operations, MUL_LAT for MUL,
// FADD_LAT for FADD/FSUB, FMUL_LAT for FMUL, 32 for DIVU/REMU), and compares the forwarded result in the last EX cycle
// and the WB result one cycle later with values computed here (doubles by
// the simulator's real arithmetic, on operands that stay in the normal
// range). It also
// checks the store port, branch outcomes, that dpost is announced, and that
// a speculative instruction killed by a mispredict neither announces nor
// writes back, while a committed one does both.
module tb_func_unit;
  import disvliw_pkg::*;

  localparam int unsigned MUL_LAT = 4, FADD_LAT = 4, FMUL_LAT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // one set of signals per unit: index 0 integer, 1 long-latency
  logic             issue [2];
  iq_entry_t        entry [2];
  logic [XLEN-1:0]  opa [2], opb [2];
  logic             ready [2], busy [2];
  logic             commit, mispredict;
  logic             ann_valid [2], ann_spec [2];
  logic [DEP_W-1:0] ann_dpost [2];
  logic             fwd_valid [2];
  logic [4:0]       fwd_rd [2];
  logic [XLEN-1:0]  fwd_data [2];
  logic             wb_valid [2], wb_spec [2];
  logic [4:0]       wb_rd [2];
  logic [XLEN-1:0]  wb_data [2];
  logic             mem_we [2];
  logic [XLEN-1:0]  mem_addr [2], mem_wdata [2], mem_rdata [2];
  logic             br_valid [2], br_taken [2];
  logic [PC_W-1:0]  br_target [2];

  for (genvar u = 0; u < 2; u++) begin : g_u
    func_unit #(.IS_LONG(u == 1), .MUL_LAT(MUL_LAT), .FADD_LAT(FADD_LAT),
                .FMUL_LAT(FMUL_LAT)) dut (
      .clk, .rst_n, .issue(issue[u]), .entry(entry[u]), .opa(opa[u]), .opb(opb[u]),
      .ready(ready[u]), .busy(busy[u]), .commit, .mispredict,
      .ann_valid(ann_valid[u]), .ann_dpost(ann_dpost[u]), .ann_spec(ann_spec[u]),
      .fwd_valid(fwd_valid[u]), .fwd_rd(fwd_rd[u]), .fwd_data(fwd_data[u]),
      .wb_valid(wb_valid[u]), .wb_rd(wb_rd[u]), .wb_data(wb_data[u]), .wb_spec(wb_spec[u]),
      .mem_we(mem_we[u]), .mem_addr(mem_addr[u]), .mem_wdata(mem_wdata[u]),
      .mem_rdata(mem_rdata[u]),
      .br_valid(br_valid[u]), .br_taken(br_taken[u]), .br_target(br_target[u]));
    assign mem_rdata[u] = mem_addr[u] ^ 64'h0123_0000_5A5A_0000;
  end

  int checks = 0, failures = 0;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] model(op_e op, logic [63:0] a, logic [63:0] b,
                                        logic [15:0] lo);
    logic [63:0] imm = {{48{lo[15]}}, lo};
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_ADDI: return a + imm;
      OP_LUI:  return {32'h0, lo, 16'h0};
      OP_LW:   return (a + imm) ^ 64'h0123_0000_5A5A_0000;
      OP_MUL:  return a * b;
      OP_DIVU: return (b[31:0] == 0) ? 64'hFFFF_FFFF : {32'h0, a[31:0] / b[31:0]};
      OP_REMU: return (b[31:0] == 0) ? {32'h0, a[31:0]} : {32'h0, a[31:0] % b[31:0]};
      OP_FADD: return $realtobits($bitstoreal(a) + $bitstoreal(b));
      OP_FSUB: return $realtobits($bitstoreal(a) - $bitstoreal(b));
      OP_FMUL: return $realtobits($bitstoreal(a) * $bitstoreal(b));
      default: return 0;
    endcase
  endfunction

  // Issue one operation on unit u and follow it to WB.
  task automatic run(int u, op_e op, logic spec, logic kill, logic do_commit);
    logic [63:0] a, b, exp;
    logic [15:0] lo;
    int lat, n;
    logic seen_ann;
    a  = {$urandom, $urandom};
    b  = ($urandom_range(0, 3) == 0) ? 64'($urandom_range(0, 40)) : {$urandom, $urandom};
    if (op == OP_FADD || op == OP_FSUB || op == OP_FMUL) begin
      a[62:52] = 11'($urandom_range(800, 1200));
      b[62:52] = 11'($urandom_range(800, 1200));
    end
    lo = 16'($urandom);
    case (op)
      OP_MUL:           lat = MUL_LAT;
      OP_FADD, OP_FSUB: lat = FADD_LAT;
      OP_FMUL:          lat = FMUL_LAT;
      OP_DIVU, OP_REMU: lat = 32;
      default:          lat = 1;
    endcase
    exp = model(op, a, b, lo);
    @(negedge clk);
    entry[u] = '0;
    entry[u].spec = spec;
    entry[u].slot.ins.op = op;
    entry[u].slot.ins.rd = 5'($urandom_range(1, 31));
    entry[u].slot.ins.lo = lo;
    entry[u].slot.dpost  = DEP_W'($urandom);
    opa[u] = a; opb[u] = b;
    issue[u] = 1'b1;
    chk("ready before issue", 32'(ready[u]), 1);
    @(negedge clk);
    issue[u] = 1'b0;
    n = 1;
    seen_ann = 0;
    while (n <= 40) begin
      if (kill && n == 2) mispredict = 1'b1;
      if (do_commit && n == 1) commit = 1'b1;
      #1;
      if (ann_valid[u]) begin
        seen_ann = 1;
        chk("latency", 32'(n), 32'(lat));
        chk("ann dpost", 32'(ann_dpost[u]), 32'(entry[u].slot.dpost));
        if (writes_rd(op)) begin
          chk("fwd valid", 32'(fwd_valid[u]), 1);
          chk($sformatf("fwd data op %0d", op), fwd_data[u], exp);
        end
        if (op == OP_SW) begin
          chk("store we", 32'(mem_we[u]), 1);
          chk("store addr", mem_addr[u], a + {{48{lo[15]}}, lo});
          chk("store data", mem_wdata[u], b);
        end
        if (is_branch(op)) begin
          chk("br valid", 32'(br_valid[u]), 1);
          chk("br taken", 32'(br_taken[u]),
              32'(op == OP_JMP || (op == OP_BEQ && a == b) || (op == OP_BNE && a != b)));
          chk("br target", 32'(br_target[u]), 32'(lo));
        end
        @(negedge clk);
        mispredict = 1'b0; commit = 1'b0;
        chk("wb valid", 32'(wb_valid[u]), 32'(writes_rd(op)));
        if (writes_rd(op)) begin
          chk("wb data", wb_data[u], exp);
          chk("wb rd", 32'(wb_rd[u]), 32'(entry[u].slot.ins.rd));
          chk("wb spec", 32'(wb_spec[u]), 32'(spec && !do_commit));
        end
        break;
      end
      @(negedge clk);
      mispredict = 1'b0; commit = 1'b0;
      n++;
    end
    mispredict = 1'b0; commit = 1'b0;
    chk("announced unless killed", 32'(seen_ann), 32'(!kill));
    if (kill) chk("idle after kill", 32'(busy[u]), 0);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  op_e int_ops [] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
                      OP_ADDI, OP_LUI, OP_LW, OP_SW, OP_BEQ, OP_BNE, OP_JMP};
  op_e long_ops [] = '{OP_MUL, OP_DIVU, OP_REMU, OP_FADD, OP_FSUB, OP_FMUL};

  initial begin
    for (int u = 0; u < 2; u++) begin issue[u] = 0; entry[u] = '0; opa[u] = 0; opb[u] = 0; end
    commit = 0; mispredict = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) run(0, int_ops[$urandom_range(0, int_ops.size() - 1)], 0, 0, 0);
    for (int t = 0; t < 200; t++) run(1, long_ops[$urandom_range(0, 5)], 0, 0, 0);
    // speculation: killed and committed
    for (int t = 0; t < 10; t++) run(1, long_ops[$urandom_range(0, 5)], 1, 1, 0);
    for (int t = 0; t < 10; t++) run(1, long_ops[$urandom_range(0, 5)], 1, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

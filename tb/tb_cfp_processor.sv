// tb_cfp_processor: end-to-end testbench of the processor at its default size
// (8 KB RAM, 32 registers).
//
// The host port loads a program and N random operand records, pulses start,
// waits for done and reads the results back through the same port. Each record
// holds two single-precision numbers and two complex half-precision words; the
// program loop loads them (four load stalls), runs all five single-precision
// operations (each in a different rounding mode), the three complex operations
// and two integer operations, stores ten results and branches back (one flush
// per iteration). After the loop it reads the sticky flags, forces an overflow,
// a division by zero and an unassigned complex code, reads the flags again, and
// takes a branch over an instruction. Every stored word is compared with the
// fp_ref_pkg model; the cycle count from start to done is checked against
// instructions + load stalls + branch flushes + one refill cycle; and every
// mechanism (stall, flush, each operation, each rounding mode, each flag, flag
// read) is counted and must occur at least once.
module tb_cfp_processor;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N        = 64;
  localparam int IN_BASE  = 512;
  localparam int OUT_BASE = 1024;

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, start = 0;
  logic        busy, done, host_we;
  logic [10:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  fp_flags_t   fp_flags;
  logic [31:0] stall_count, flush_count, instr_count;

  always #5 clk = ~clk;

  cfp_processor dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata),
    .fp_flags(fp_flags), .stall_count(stall_count), .flush_count(flush_count),
    .instr_count(instr_count));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [10:0] fn(fpu_op_t op, rmode_t rm);
    return {4'd0, rm, 2'd0, op};
  endfunction
  function automatic logic [10:0] cfn(logic [2:0] op, rmode_t rm);
    return {4'd0, rm, 2'd0, op};
  endfunction

  // ---------------- mechanism counters (observed inside the design)
  int n_stall, n_flush, n_fpu [5], n_cpx [3], n_rm [4], n_int, n_rdfl, n_illegal;
  int n_ovf, n_dz, n_inv, n_nx;
  always @(posedge clk) if (rst_n) begin
    if (dut.ld_pending) n_stall++;
    if (dut.br_taken) n_flush++;
    if (dut.exec) begin
      if (dut.ctrl.fp_en) begin
        n_fpu[int'(dut.ctrl.fpu_op)]++;
        n_rm[int'(dut.ctrl.rm)]++;
        if (dut.fpu_flags.overflow) n_ovf++;
        if (dut.fpu_flags.divzero)  n_dz++;
        if (dut.fpu_flags.invalid)  n_inv++;
        if (dut.fpu_flags.inexact)  n_nx++;
      end
      if (dut.ctrl.cpx_en) begin
        if (dut.ctrl.cpx_op < 3) n_cpx[int'(dut.ctrl.cpx_op)]++;
        if (dut.cpx_illegal) n_illegal++;
      end
      if (dut.ctrl.wb_sel == WB_ALU && dut.ctrl.reg_we && dut.ctrl.alu_src == SRC_REG) n_int++;
      if (dut.ctrl.flags_clr) n_rdfl++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [64];
  logic [31:0] data [N*4];

  task automatic host_write(int addr, logic [31:0] w);
    host_addr = 11'(addr); host_wdata = w; host_we = 1'b1;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  task automatic host_read(int addr, output logic [31:0] w);
    host_addr = 11'(addr);
    @(posedge clk); #1;
    w = host_rdata;
  endtask

  initial begin
    int          pc, cycles, exp_instr;
    logic [31:0] got, r, rr, ri, p1, p2, p3, p4;
    logic [4:0]  fl, f1, f2, f3, f4, f5, f6, flags_loop;
    host_we = 0; host_addr = 0; host_wdata = 0;

    // ---------------- program
    pc = 0;
    prog[pc++] = enc_i(OP_ORI, 5'd10, 5'd0, 16'(IN_BASE));
    prog[pc++] = enc_i(OP_ORI, 5'd11, 5'd0, 16'(OUT_BASE));
    prog[pc++] = enc_i(OP_ORI, 5'd12, 5'd0, 16'(N));
    // loop: pc = 3
    prog[pc++] = enc_i(OP_LW, 5'd1, 5'd10, 16'd0);
    prog[pc++] = enc_i(OP_LW, 5'd2, 5'd10, 16'd1);
    prog[pc++] = enc_i(OP_LW, 5'd3, 5'd10, 16'd2);
    prog[pc++] = enc_i(OP_LW, 5'd4, 5'd10, 16'd3);
    prog[pc++] = enc_r(OP_FPU, 5'd5, 5'd1, 5'd2, fn(FPU_ADD,  RM_RNE));
    prog[pc++] = enc_r(OP_FPU, 5'd6, 5'd1, 5'd2, fn(FPU_SUB,  RM_RTZ));
    prog[pc++] = enc_r(OP_FPU, 5'd7, 5'd1, 5'd2, fn(FPU_MUL,  RM_RUP));
    prog[pc++] = enc_r(OP_FPU, 5'd8, 5'd1, 5'd2, fn(FPU_DIV,  RM_RDN));
    prog[pc++] = enc_r(OP_FPU, 5'd9, 5'd1, 5'd2, fn(FPU_SQRT, RM_RNE));
    prog[pc++] = enc_r(OP_CPX, 5'd13, 5'd3, 5'd4, cfn(CPX_ADD, RM_RNE));
    prog[pc++] = enc_r(OP_CPX, 5'd14, 5'd3, 5'd4, cfn(CPX_SUB, RM_RTZ));
    prog[pc++] = enc_r(OP_CPX, 5'd15, 5'd3, 5'd4, cfn(CPX_MUL, RM_RNE));
    prog[pc++] = enc_r(OP_ALU, 5'd16, 5'd3, 5'd4, 11'(ALU_ADD));
    prog[pc++] = enc_r(OP_ALU, 5'd17, 5'd3, 5'd4, 11'(ALU_MUL));
    prog[pc++] = enc_i(OP_SW, 5'd5,  5'd11, 16'd0);
    prog[pc++] = enc_i(OP_SW, 5'd6,  5'd11, 16'd1);
    prog[pc++] = enc_i(OP_SW, 5'd7,  5'd11, 16'd2);
    prog[pc++] = enc_i(OP_SW, 5'd8,  5'd11, 16'd3);
    prog[pc++] = enc_i(OP_SW, 5'd9,  5'd11, 16'd4);
    prog[pc++] = enc_i(OP_SW, 5'd13, 5'd11, 16'd5);
    prog[pc++] = enc_i(OP_SW, 5'd14, 5'd11, 16'd6);
    prog[pc++] = enc_i(OP_SW, 5'd15, 5'd11, 16'd7);
    prog[pc++] = enc_i(OP_SW, 5'd16, 5'd11, 16'd8);
    prog[pc++] = enc_i(OP_SW, 5'd17, 5'd11, 16'd9);
    prog[pc++] = enc_i(OP_ADDI, 5'd10, 5'd10, 16'd4);
    prog[pc++] = enc_i(OP_ADDI, 5'd11, 5'd11, 16'd10);
    prog[pc++] = enc_i(OP_ADDI, 5'd12, 5'd12, 16'hffff);
    prog[pc++] = enc_i(OP_BNE, 5'd12, 5'd0, 16'(3 - 31));          // pc 30
    prog[pc++] = enc_i(OP_RDFL, 5'd20, 5'd0, 16'd0);               // pc 31
    prog[pc++] = enc_i(OP_SW, 5'd20, 5'd11, 16'd0);
    prog[pc++] = enc_i(OP_LUI, 5'd21, 5'd0, 16'h7f7f);
    prog[pc++] = enc_r(OP_FPU, 5'd22, 5'd21, 5'd21, fn(FPU_MUL, RM_RNE));
    prog[pc++] = enc_r(OP_FPU, 5'd23, 5'd21, 5'd0,  fn(FPU_DIV, RM_RNE));
    prog[pc++] = enc_i(OP_RDFL, 5'd24, 5'd0, 16'd0);
    prog[pc++] = enc_i(OP_SW, 5'd24, 5'd11, 16'd1);
    prog[pc++] = enc_i(OP_SW, 5'd22, 5'd11, 16'd2);
    prog[pc++] = enc_i(OP_SW, 5'd23, 5'd11, 16'd3);
    prog[pc++] = enc_r(OP_CPX, 5'd25, 5'd3, 5'd4, cfn(3'd5, RM_RNE));
    prog[pc++] = enc_i(OP_RDFL, 5'd26, 5'd0, 16'd0);
    prog[pc++] = enc_i(OP_SW, 5'd26, 5'd11, 16'd4);
    prog[pc++] = enc_i(OP_BEQ, 5'd0, 5'd0, 16'd1);                 // pc 43: skip next
    prog[pc++] = enc_i(OP_ORI, 5'd27, 5'd0, 16'hdead);
    prog[pc++] = enc_i(OP_SW, 5'd27, 5'd11, 16'd5);
    prog[pc++] = enc_i(OP_HALT, 5'd0, 5'd0, 16'd0);                // pc 46

    for (int i = 0; i < N; i++) begin
      data[4*i+0] = rand_fp(8, 23, 110, 130);
      data[4*i+1] = rand_fp(8, 23, 110, 130);
      data[4*i+2] = {16'(rand_fp(5, 10, 9, 21)), 16'(rand_fp(5, 10, 9, 21))};
      data[4*i+3] = {16'(rand_fp(5, 10, 9, 21)), 16'(rand_fp(5, 10, 9, 21))};
    end
    data[0][31] = 1'b0;          // first sqrt operand positive, so both cases occur
    data[4][31] = 1'b1;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < pc; i++) host_write(i, prog[i]);
    for (int i = 0; i < 4*N; i++) host_write(IN_BASE + i, data[i]);

    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end

    // ---------------- results
    flags_loop = '0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] a, b, ca, cb;
      int o;
      a = data[4*i]; b = data[4*i+1]; ca = data[4*i+2]; cb = data[4*i+3];
      o = OUT_BASE + 10*i;
      r = ref_add(a, b, 1'b0, 8, 23, 0, fl); flags_loop |= fl;
      host_read(o+0, got); chk(got, r, "fadd");
      r = ref_add(a, b, 1'b1, 8, 23, 1, fl); flags_loop |= fl;
      host_read(o+1, got); chk(got, r, "fsub rtz");
      r = ref_mul(a, b, 8, 23, 3, fl); flags_loop |= fl;
      host_read(o+2, got); chk(got, r, "fmul rup");
      r = ref_div(a, b, 8, 23, 2, fl); flags_loop |= fl;
      host_read(o+3, got); chk(got, r, "fdiv rdn");
      if (a[31]) begin r = 32'h7fc00000; fl = 5'b10000; end
      else r = ref_sqrt(a, 8, 23, 0, fl);
      flags_loop |= fl;
      host_read(o+4, got); chk(got, r, "fsqrt");
      rr = ref_add({16'd0, ca[31:16]}, {16'd0, cb[31:16]}, 1'b0, 5, 10, 0, f1);
      ri = ref_add({16'd0, ca[15:0]},  {16'd0, cb[15:0]},  1'b0, 5, 10, 0, f2);
      flags_loop |= f1 | f2;
      host_read(o+5, got); chk(got, {rr[15:0], ri[15:0]}, "cadd");
      rr = ref_add({16'd0, ca[31:16]}, {16'd0, cb[31:16]}, 1'b1, 5, 10, 1, f1);
      ri = ref_add({16'd0, ca[15:0]},  {16'd0, cb[15:0]},  1'b1, 5, 10, 1, f2);
      flags_loop |= f1 | f2;
      host_read(o+6, got); chk(got, {rr[15:0], ri[15:0]}, "csub rtz");
      p1 = ref_mul({16'd0, ca[31:16]}, {16'd0, cb[31:16]}, 5, 10, 0, f1);
      p2 = ref_mul({16'd0, ca[15:0]},  {16'd0, cb[15:0]},  5, 10, 0, f2);
      p3 = ref_mul({16'd0, ca[31:16]}, {16'd0, cb[15:0]},  5, 10, 0, f3);
      p4 = ref_mul({16'd0, ca[15:0]},  {16'd0, cb[31:16]}, 5, 10, 0, f4);
      rr = ref_add(p1, p2, 1'b1, 5, 10, 0, f5);
      ri = ref_add(p3, p4, 1'b0, 5, 10, 0, f6);
      flags_loop |= f1 | f2 | f3 | f4 | f5 | f6;
      host_read(o+7, got); chk(got, {rr[15:0], ri[15:0]}, "cmul");
      host_read(o+8, got); chk(got, ca + cb, "iadd");
      host_read(o+9, got); chk(got, 32'(64'(ca) * 64'(cb)), "imul");
    end
    host_read(OUT_BASE + 10*N + 0, got); chk(got, {27'd0, flags_loop}, "loop flags");
    host_read(OUT_BASE + 10*N + 1, got); chk(got, {27'd0, 5'b01101}, "ovf/dz flags");
    host_read(OUT_BASE + 10*N + 2, got); chk(got, 32'h7f800000, "overflow result");
    host_read(OUT_BASE + 10*N + 3, got); chk(got, 32'h7f800000, "x/0 result");
    host_read(OUT_BASE + 10*N + 4, got); chk(got, {27'd0, 5'b10000}, "illegal cpx flag");
    host_read(OUT_BASE + 10*N + 5, got); chk(got, 32'h0, "branch skipped instruction");

    // ---------------- timing
    exp_instr = 3 + 28*N + 15;
    chk(instr_count, 32'(exp_instr), "instructions retired");
    chk(stall_count, 32'(4*N), "load stalls");
    chk(flush_count, 32'(N), "branch flushes");          // N-1 loop branches + 1 BEQ
    chk(32'(cycles), 32'(exp_instr + 4*N + N + 1), "cycles start to done");
    chk(32'(fp_flags), 32'h0, "sticky flags port cleared by the last flag read");

    // ---------------- mechanisms
    begin
      int mech [string];
      mech["load stall"] = n_stall;   mech["branch flush"] = n_flush;
      mech["fadd"] = n_fpu[0]; mech["fsub"] = n_fpu[1]; mech["fmul"] = n_fpu[2];
      mech["fdiv"] = n_fpu[3]; mech["fsqrt"] = n_fpu[4];
      mech["cadd"] = n_cpx[0]; mech["csub"] = n_cpx[1]; mech["cmul"] = n_cpx[2];
      mech["rne"] = n_rm[0]; mech["rtz"] = n_rm[1]; mech["rdn"] = n_rm[2]; mech["rup"] = n_rm[3];
      mech["integer op"] = n_int; mech["flag read"] = n_rdfl; mech["illegal cpx"] = n_illegal;
      mech["overflow"] = n_ovf; mech["divzero"] = n_dz; mech["invalid"] = n_inv; mech["inexact"] = n_nx;
      foreach (mech[k]) begin
        $display("mechanism %-13s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    $display("cycles=%0d instructions=%0d", cycles, instr_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

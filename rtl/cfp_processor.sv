// cfp_processor: processor with integer, single-precision floating point and
// complex floating point arithmetic units.
//
// Datapath: a register bank of 32 x 32-bit registers with two read ports feeds
// three arithmetic units side by side - the integer ALU, the single-precision
// unit (add, sub, mul, div, sqrt) and the complex unit (add, sub, mul on two
// half-precision parts packed in one word). The write-back bus multiplexer
// returns one unit's result, the loaded word, an immediate or the exception
// flags to the register bank. Program and data share an 8 KB dual-port on-chip
// RAM (port A fetches, port B loads/stores).
// Control path: a two-stage pipeline. Stage 1 presents the PC to the RAM's
// fetch port; stage 2 decodes the word that comes out (control_unit), reads
// the registers, executes and writes back in the same cycle, so no operand
// hazards arise. A load reads the RAM in stage 2 and writes its register in
// the next cycle, during which the pipeline stalls for one cycle. A taken branch
// discards the instruction already fetched (one-cycle flush).
// Host interface: while the core is not busy the host reads and writes the RAM
// through port B (read data one cycle after the address). A start pulse begins
// execution at word 0 and clears the sticky flags; HALT stops the core and
// raises done. IEEE exception flags of the floating point and complex units
// accumulate in a sticky register, readable by RDFL and on fp_flags; an
// unassigned complex operation code sets the invalid flag.
// The instruction set and encoding (cfp_pkg) are this design's own.
module cfp_processor
  import cfp_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 8192,
  localparam int unsigned AW = $clog2(RAM_BYTES / 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output fp_flags_t     fp_flags,
  output logic [31:0]   stall_count,
  output logic [31:0]   flush_count,
  output logic [31:0]   instr_count
);
  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DONE } state_t;
  state_t state;

  // fetch / execute stage state
  logic [AW-1:0] pc_f;       // address presented to the fetch port
  logic [AW-1:0] ex_pc;      // address of the word now at the fetch port output
  logic          ex_valid;   // that word is to be executed
  logic          ld_pending; // second cycle of a load: write back memory data
  logic [4:0]    ld_rd;

  logic [31:0] instr, mem_a_rdata, mem_b_rdata;
  ctrl_t       ctrl;
  logic        exec;         // an instruction executes this cycle
  logic [31:0] rd_a, rd_b, alu_b, alu_y, fpu_y, cpx_y, wb_data;
  fp_flags_t   fpu_flags, cpx_flags;
  logic        cpx_illegal;
  logic        br_taken;
  logic [AW-1:0] br_target;
  logic [AW-1:0] mem_b_addr;
  logic          mem_b_we;
  logic [31:0]   mem_b_wdata;
  logic        rf_we;
  logic [4:0]  rf_wa;
  wb_sel_t     wb_sel;

  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);

  onchip_ram #(.BYTES(RAM_BYTES)) u_ram (
    .clk(clk),
    .a_addr(pc_f), .a_rdata(mem_a_rdata),
    .b_addr(mem_b_addr), .b_we(mem_b_we), .b_wdata(mem_b_wdata), .b_rdata(mem_b_rdata)
  );
  assign host_rdata = mem_b_rdata;
  assign instr      = mem_a_rdata;

  control_unit u_ctrl (.instr(instr), .ctrl(ctrl));

  assign exec = busy && ex_valid && !ld_pending;

  reg_bank #(.NREGS(32), .WIDTH(32)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .ra_a(ctrl.rs), .rd_a(rd_a),
    .ra_b(ctrl.b_is_rd ? ctrl.rd : ctrl.rt), .rd_b(rd_b),
    .we(rf_we), .wa(rf_wa), .wd(wb_data)
  );

  assign alu_b = (ctrl.alu_src == SRC_IMM) ? ctrl.imm : rd_b;
  int_alu u_alu (.op(ctrl.alu_op), .a(rd_a), .b(alu_b), .y(alu_y));
  fpu32   u_fpu (.op(ctrl.fpu_op), .rm(ctrl.rm), .a(rd_a), .b(rd_b), .y(fpu_y), .flags(fpu_flags));
  cfpu16  u_cpx (.op(ctrl.cpx_op), .rm(ctrl.rm), .a(rd_a), .b(rd_b), .y(cpx_y),
                 .flags(cpx_flags), .illegal(cpx_illegal));

  assign wb_sel = ld_pending ? WB_MEM : ctrl.wb_sel;
  bus_mux u_bus (
    .sel(wb_sel), .alu(alu_y), .fpu(fpu_y), .cpx(cpx_y), .mem(mem_b_rdata),
    .imm(ctrl.imm), .flags({27'd0, fp_flags}), .y(wb_data)
  );

  // register write: a finished load, or any writing instruction other than a load
  assign rf_we = ld_pending || (exec && ctrl.reg_we && !ctrl.mem_re);
  assign rf_wa = ld_pending ? ld_rd : ctrl.rd;

  // data port: the core while running, the host otherwise
  always_comb begin
    if (busy) begin
      mem_b_addr  = alu_y[AW-1:0];
      mem_b_we    = exec && ctrl.mem_we;
      mem_b_wdata = rd_b;
    end else begin
      mem_b_addr  = host_addr;
      mem_b_we    = host_we;
      mem_b_wdata = host_wdata;
    end
  end

  assign br_taken  = exec && ctrl.branch && ((rd_a == rd_b) ^ ctrl.br_ne);
  assign br_target = ex_pc + AW'(1) + ctrl.imm[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc_f        <= '0;
      ex_pc       <= '0;
      ex_valid    <= 1'b0;
      ld_pending  <= 1'b0;
      ld_rd       <= '0;
      fp_flags    <= '0;
      stall_count <= '0;
      flush_count <= '0;
      instr_count <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state       <= S_RUN;
            pc_f        <= '0;
            ex_valid    <= 1'b0;
            ld_pending  <= 1'b0;
            fp_flags    <= '0;
            stall_count <= '0;
            flush_count <= '0;
            instr_count <= '0;
          end
        end
        S_RUN: begin
          ex_pc      <= pc_f;
          ld_pending <= 1'b0;
          if (ld_pending) begin
            // load write-back cycle: the fetched word is refetched
            pc_f        <= pc_f + AW'(1);
            ex_valid    <= 1'b1;
            stall_count <= stall_count + 1;
          end else if (exec) begin
            instr_count <= instr_count + 1;
            if (ctrl.halt) begin
              state    <= S_DONE;
              ex_valid <= 1'b0;
            end else if (br_taken) begin
              pc_f        <= br_target;
              ex_valid    <= 1'b0;
              flush_count <= flush_count + 1;
            end else if (ctrl.mem_re) begin
              ld_pending <= 1'b1;
              ld_rd      <= ctrl.rd;
              ex_valid   <= 1'b0;
            end else begin
              pc_f     <= pc_f + AW'(1);
              ex_valid <= 1'b1;
            end
            if (ctrl.flags_clr)  fp_flags <= '0;
            else if (ctrl.fp_en)  fp_flags <= fp_flags | fpu_flags;
            else if (ctrl.cpx_en) fp_flags <= fp_flags | cpx_flags
                                                  | fp_flags_t'({cpx_illegal, 4'b0000});
          end else begin
            // pipeline refill after start or a taken branch
            pc_f     <= pc_f + AW'(1);
            ex_valid <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a load and a store never both drive the data port
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.mem_re && ctrl.mem_we));
endmodule

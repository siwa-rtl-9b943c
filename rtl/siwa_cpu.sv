// siwa_cpu: the Siwa RV32I processor, a centrally controlled multi-cycle
// (non-pipelined) CPU.
//
// One finite state machine sequences every instruction through the shared
// datapath: instruction decoder (ID), 32 x 32 register file (RF), ALU, CSR
// file, internal timer and interrupt decoder. Memory is reached only through
// the memory and bus controller (MBC) handshake: a one-cycle m_en pulse,
// then wait for mem_rdy (done) or error_drs (bad address).
//
// States and cycles:
//   BOOT   wait until the boot loader has filled the SRAM.
//   FETCH  interrupt check: the condition multiplexer selects the interrupt
//          decoder. If an enabled interrupt is pending (and none is being
//          serviced) the PC is saved in mepc, the cause goes to mcausea /
//          mcauseb, the PC is loaded from mtvec and maskable interrupts are
//          turned off. Otherwise the instruction fetch starts (m_en).
//   IWAIT  wait for the MBC; when mem_rdy returns, ld_id captures the word.
//   EXEC   one ALU evaluation; register/CSR write-back, branch, jump,
//          MRET, ECALL/EBREAK, illegal instruction, or start of a load or
//          store.
//   DWAIT  wait for the MBC to finish a load or store.
// With the SRAM's one-cycle read, ALU, branch, jump and CSR instructions
// take 4 cycles, word loads and stores 6, byte and half-word stores 7.
//
// The next-state logic picks, for every state, which condition the
// 4-input condition multiplexer feeds back to it: 0 (none),
// {error_drs, mem_rdy}, the interrupt decoder's code, or {0, taken} for a
// branch. Exceptions (illegal instruction, bad address, ECALL, EBREAK) are
// always taken; they turn maskable interrupts off if they were on. MRET
// returns to mepc and turns them back on.
// The structure (condition multiplexer, interrupt decoder with toggle
// flip-flop, multi-cycle control, interrupt check before the fetch) follows
// the document; the exact state list, outputs decoded without an output
// register and the mcausea/mcauseb contents are this design's choice.
module siwa_cpu
  import siwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        boot_done,
  // MBC handshake
  output logic        m_en,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  output mem_size_e   m_size,
  output logic        m_uns,
  input  logic        mem_rdy,
  input  logic        error_drs,
  input  logic [31:0] d_read,
  input  logic [31:0] err_addr,
  // bus messages held by the MBC
  input  logic        msg_valid,
  input  bus_pkg_t    msg_pkg,
  output logic        msg_ack,
  // interrupts and peripherals
  input  logic        analog_irq,
  input  logic [7:0]  gpio_in,
  output logic [7:0]  gpio_out,
  output logic [7:0]  gpio_conf,
  output logic        bs_en,
  output logic [7:0]  frls,
  output logic [31:0] isval,
  output logic [31:0] isconf,
  output logic [4:0]  istrg,
  // observation
  output logic [31:0] pc,
  output logic        retire,     // one pulse per completed instruction
  output logic        trap        // one pulse per interrupt/exception taken
);
  typedef enum logic [2:0] { S_BOOT, S_FETCH, S_IWAIT, S_EXEC, S_DWAIT } state_e;

  state_e      st, nst;
  // --------------------------------------------------------------- ID
  logic        ld_id;
  codif_e      codif;
  logic [31:0] imm, instr;
  logic [4:0]  rd, rs1, rs2;
  logic [11:0] csr;
  logic [2:0]  funct3;

  instr_decoder u_id (
    .clk, .rst_n, .ld_id, .d_read, .codif, .imm, .rd, .rs1, .rs2, .csr,
    .funct3, .instr
  );

  // --------------------------------------------------------------- RF
  logic        rf_we;
  logic [31:0] rf_wd, rs1v, rs2v;

  reg_file u_rf (
    .clk, .rst_n, .ra1(rs1), .ra2(rs2), .rd1(rs1v), .rd2(rs2v),
    .we(rf_we), .wa(rd), .wd(rf_wd)
  );

  // -------------------------------------------------------------- ALU
  alu_op_e     alu_op;
  logic [31:0] alu_a, alu_b, alu_y;
  logic        f_eq, f_lt, f_ltu;

  alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y),
             .eq(f_eq), .lt(f_lt), .ltu(f_ltu));

  // ------------------------------------------------- CSR, timer, IRQ
  logic        csr_we, trap_take, enbl_ntrpt, actv_ntrpt;
  logic [31:0] csr_wdata, csr_rdata, mcr, mepc, mtvec, tmrfnc, tmrval;
  logic        wr_tmrfnc, wr_tmrval, timer_hit;
  logic        set_maip, set_mipt, set_mipio;
  logic [1:0]  ntrpt_cond;
  cause_e      trap_cause;
  logic [28:0] trap_info_a;
  logic [31:0] trap_info_b;

  csr_file u_csr (
    .clk, .rst_n, .csr_addr(csr), .csr_we, .csr_wdata, .csr_rdata,
    .set_maip, .set_mipt, .set_mipio,
    .trap_take, .trap_cause, .trap_pc(pc), .trap_info_a, .trap_info_b,
    .tmrfnc, .tmrval, .wr_tmrfnc, .wr_tmrval,
    .gpio_in, .mcr, .mepc, .mtvec, .gpio_out, .frls, .isval, .isconf, .istrg
  );

  timer u_tmr (
    .clk, .rst_n, .wr_fnc(wr_tmrfnc), .wr_val(wr_tmrval), .wdata(csr_wdata),
    .tmrfnc, .tmrval, .hit(timer_hit)
  );

  irq_decoder u_irq (
    .clk, .rst_n, .analog_irq, .timer_hit, .ext_msg(msg_valid),
    .mcr_lo(mcr[5:0]), .enbl_ntrpt, .set_maip, .set_mipt, .set_mipio,
    .actv_ntrpt, .cond(ntrpt_cond)
  );

  assign gpio_conf = mcr[15:8];
  assign bs_en     = mcr[MCR_BS_EN];

  // ------------------------------------------------- condition mux
  logic [1:0] s_cond, cond;
  logic       taken;

  always_comb begin
    unique case (codif)
      I_BEQ:   taken = f_eq;
      I_BNE:   taken = !f_eq;
      I_BLT:   taken = f_lt;
      I_BGE:   taken = !f_lt;
      I_BLTU:  taken = f_ltu;
      I_BGEU:  taken = !f_ltu;
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    unique case (s_cond)
      2'd0: cond = 2'b00;
      2'd1: cond = {error_drs, mem_rdy};
      2'd2: cond = ntrpt_cond;
      default: cond = {1'b0, taken};
    endcase
  end

  // -------------------------------------------------- classification
  logic is_load, is_store, is_branch, is_csr, is_csr_imm, is_alu_r;
  assign is_load    = codif inside {I_LB, I_LH, I_LW, I_LBU, I_LHU};
  assign is_store   = codif inside {I_SB, I_SH, I_SW};
  assign is_branch  = codif inside {I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU};
  assign is_csr     = codif inside {I_CSRRW, I_CSRRS, I_CSRRC, I_CSRRWI, I_CSRRSI, I_CSRRCI};
  assign is_csr_imm = codif inside {I_CSRRWI, I_CSRRSI, I_CSRRCI};
  assign is_alu_r   = codif inside {I_ADD, I_SUB, I_SLL, I_SLT, I_SLTU, I_XOR,
                                    I_SRL, I_SRA, I_OR, I_AND};

  always_comb begin
    unique case (codif)
      I_SUB:                 alu_op = ALU_SUB;
      I_SLL, I_SLLI:         alu_op = ALU_SLL;
      I_SLT, I_SLTI:         alu_op = ALU_SLT;
      I_SLTU, I_SLTIU:       alu_op = ALU_SLTU;
      I_XOR, I_XORI:         alu_op = ALU_XOR;
      I_SRL, I_SRLI:         alu_op = ALU_SRL;
      I_SRA, I_SRAI:         alu_op = ALU_SRA;
      I_OR, I_ORI:           alu_op = ALU_OR;
      I_AND, I_ANDI:         alu_op = ALU_AND;
      I_LUI:                 alu_op = ALU_PASSB;
      I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU: alu_op = ALU_SUB;
      default:               alu_op = ALU_ADD;
    endcase
    alu_a = (codif == I_AUIPC) ? pc : rs1v;
    alu_b = (is_alu_r || is_branch) ? rs2v : imm;
  end

  // CSR source and new value
  logic [31:0] csr_src, csr_new;
  logic        csr_write;
  always_comb begin
    csr_src = is_csr_imm ? imm : rs1v;
    unique case (codif)
      I_CSRRS, I_CSRRSI: csr_new = csr_rdata | csr_src;
      I_CSRRC, I_CSRRCI: csr_new = csr_rdata & ~csr_src;
      default:           csr_new = csr_src;
    endcase
    // CSRRS/CSRRC with a zero source only read.
    csr_write = (codif inside {I_CSRRW, I_CSRRWI}) || (rs1 != 5'd0);
  end

  // ------------------------------------------------------ next state
  logic [31:0] pc_next, pc_plus4, pc_target;
  assign pc_plus4  = pc + 32'd4;
  assign pc_target = pc + imm;

  always_comb begin
    nst         = st;
    s_cond      = 2'd0;
    pc_next     = pc;
    ld_id       = 1'b0;
    rf_we       = 1'b0;
    rf_wd       = alu_y;
    csr_we      = 1'b0;
    csr_wdata   = csr_new;
    m_en        = 1'b0;
    m_we        = 1'b0;
    m_addr      = pc;
    m_wdata     = rs2v;
    m_size      = SZ_W;
    m_uns       = 1'b0;
    trap_take   = 1'b0;
    trap_cause  = CAUSE_NONE;
    trap_info_a = '0;
    trap_info_b = '0;
    enbl_ntrpt  = 1'b0;
    msg_ack     = 1'b0;
    retire      = 1'b0;

    unique case (st)
      S_BOOT: if (boot_done) nst = S_FETCH;

      S_FETCH: begin
        s_cond = 2'd2;
        if (cond != 2'd0) begin
          trap_take  = 1'b1;
          enbl_ntrpt = 1'b1;       // cond is 0 while one is active
          pc_next    = mtvec;
          unique case (cond)
            2'd1:    trap_cause = CAUSE_ANALOG;
            2'd2:    trap_cause = CAUSE_TIMER;
            default: begin
              trap_cause  = CAUSE_EXT;
              trap_info_a = {msg_pkg.src, msg_pkg.code, msg_pkg.addr[23:0]};
              trap_info_b = msg_pkg.data;
              msg_ack     = 1'b1;
            end
          endcase
        end else begin
          m_en = 1'b1;
          nst  = S_IWAIT;
        end
      end

      S_IWAIT: begin
        s_cond = 2'd1;
        if (cond[0]) begin
          ld_id = 1'b1;
          nst   = S_EXEC;
        end else if (cond[1]) begin
          trap_take   = 1'b1;
          trap_cause  = CAUSE_BADADDR;
          trap_info_b = err_addr;
          enbl_ntrpt  = !actv_ntrpt;
          pc_next     = mtvec;
          nst         = S_FETCH;
        end
      end

      S_EXEC: begin
        s_cond  = 2'd3;
        nst     = S_FETCH;
        pc_next = pc_plus4;
        retire  = 1'b1;
        if (codif == I_ILLEGAL || codif == I_ECALL || codif == I_EBREAK) begin
          retire      = 1'b0;
          trap_take   = 1'b1;
          trap_cause  = (codif == I_ECALL)  ? CAUSE_ECALL :
                        (codif == I_EBREAK) ? CAUSE_EBREAK : CAUSE_ILLEGAL;
          trap_info_b = instr;
          enbl_ntrpt  = !actv_ntrpt;
          pc_next     = mtvec;
        end else if (codif == I_MRET) begin
          pc_next    = mepc;
          enbl_ntrpt = actv_ntrpt;
        end else if (is_branch) begin
          if (cond[0]) pc_next = pc_target;
        end else if (codif == I_JAL) begin
          rf_we   = 1'b1;
          rf_wd   = pc_plus4;
          pc_next = pc_target;
        end else if (codif == I_JALR) begin
          rf_we   = 1'b1;
          rf_wd   = pc_plus4;
          pc_next = {alu_y[31:1], 1'b0};
        end else if (is_load || is_store) begin
          retire  = 1'b0;
          pc_next = pc;
          m_en    = 1'b1;
          m_we    = is_store;
          m_addr  = alu_y;
          m_size  = mem_size_e'(funct3[1:0]);
          m_uns   = funct3[2];
          nst     = S_DWAIT;
        end else if (is_csr) begin
          rf_we  = 1'b1;
          rf_wd  = csr_rdata;
          csr_we = csr_write;
        end else begin
          rf_we = 1'b1;             // LUI, AUIPC, register and immediate ALU ops
        end
      end

      S_DWAIT: begin
        s_cond = 2'd1;
        if (cond[0]) begin
          rf_we   = is_load;
          rf_wd   = d_read;
          pc_next = pc_plus4;
          retire  = 1'b1;
          nst     = S_FETCH;
        end else if (cond[1]) begin
          trap_take   = 1'b1;
          trap_cause  = CAUSE_BADADDR;
          trap_info_b = err_addr;
          enbl_ntrpt  = !actv_ntrpt;
          pc_next     = mtvec;
          nst         = S_FETCH;
        end
      end

      default: nst = S_BOOT;
    endcase
  end

  assign trap = trap_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_BOOT;
      pc <= '0;
    end else begin
      st <= nst;
      pc <= pc_next;
    end
  end

  // A memory transaction is only started when the MBC can take it.
  a_men_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                m_en |-> (mem_rdy || error_drs));
endmodule

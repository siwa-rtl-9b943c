// siwa_pkg: types and constants shared by the Siwa SoC.
//
// Holds the 65-bit system-bus package layout (destination, source, code,
// address, data, as laid out in the SoC's bus format), the agent IDs and
// message codes, the memory map, the CSR addresses and the unique 7-bit
// instruction codes (CODIF) that the instruction decoder hands to the
// central control FSM. The field positions of the bus package and of the
// CSRs follow the design's register and package drawings; the numeric
// values of the IDs, message codes, CSR addresses and CODIFs are this
// design's own choice, since no encoding is given for them.
package siwa_pkg;

  // ---------------------------------------------------------------- bus
  localparam int unsigned BUS_W = 65;

  typedef enum logic [2:0] {
    MSG_WRITE    = 3'd0,  // write data to address
    MSG_READ     = 3'd1,  // read request, answered by MSG_READ_RSP
    MSG_READ_RSP = 3'd2,  // answer to a read request
    MSG_DATA     = 3'd3   // unsolicited data (e.g. a received UART byte)
  } msg_code_e;

  // Bus package, bit 64 down to bit 0.
  typedef struct packed {
    logic [2:0]  dst;     // 64:62
    logic [1:0]  src;     // 61:60
    logic [2:0]  code;    // 59:57
    logic [24:0] addr;    // 56:32
    logic [31:0] data;    // 31:0
  } bus_pkg_t;

  // Agent IDs (destination/source field values).
  localparam logic [1:0] ID_MBC  = 2'd0;
  localparam logic [1:0] ID_SPI  = 2'd1;
  localparam logic [1:0] ID_UART = 2'd2;
  localparam int unsigned N_AGENTS = 3;

  // ---------------------------------------------------------- memory map
  localparam logic [31:0] SRAM_END   = 32'h0000_2000;  // 0 .. 8 kB
  localparam logic [31:0] BUS_BASE   = 32'h0080_0000;  // 8 MB
  localparam logic [31:0] UART_BASE  = 32'h0180_0000;  // 24 MB
  localparam logic [31:0] BUS_END    = 32'h0200_0000;  // 32 MB
  // Flash window: 8 MB .. 24 MB maps flash byte 0 .. 16 MB - 1.

  // Memory access size.
  typedef enum logic [1:0] {
    SZ_B = 2'd0,
    SZ_H = 2'd1,
    SZ_W = 2'd2
  } mem_size_e;

  // ---------------------------------------------------------------- CSRs
  localparam logic [11:0] CSR_MTVEC   = 12'h305;
  localparam logic [11:0] CSR_MEPC    = 12'h341;
  localparam logic [11:0] CSR_MCAUSEA = 12'h342;
  localparam logic [11:0] CSR_MCR     = 12'h7C0;
  localparam logic [11:0] CSR_MCAUSEB = 12'h7C1;
  localparam logic [11:0] CSR_TMRFNC  = 12'h7C2;
  localparam logic [11:0] CSR_TMRVAL  = 12'h7C3;
  localparam logic [11:0] CSR_GPIO    = 12'h7C4;
  localparam logic [11:0] CSR_FRLS    = 12'h7C5;
  localparam logic [11:0] CSR_ISVAL   = 12'h7C6;
  localparam logic [11:0] CSR_ISCONF  = 12'h7C7;
  localparam logic [11:0] CSR_ISTRG   = 12'h7C8;

  // mcr bit positions
  localparam int MCR_MIET   = 0;   // timer interrupt enable
  localparam int MCR_MIEIO  = 1;   // external (bus) interrupt enable
  localparam int MCR_MIPT   = 2;   // timer interrupt pending
  localparam int MCR_MIPIO  = 3;   // external (bus) interrupt pending
  localparam int MCR_MAIE   = 4;   // analog interrupt enable
  localparam int MCR_MAIP   = 5;   // analog interrupt pending
  localparam int MCR_BS_EN  = 16;  // bus (MBC bus side) enable

  // Interrupt / exception sources, mcausea[2:0].
  typedef enum logic [2:0] {
    CAUSE_NONE    = 3'd0,
    CAUSE_ILLEGAL = 3'd1,
    CAUSE_BADADDR = 3'd2,
    CAUSE_EXT     = 3'd3,
    CAUSE_TIMER   = 3'd4,
    CAUSE_ANALOG  = 3'd5,
    CAUSE_ECALL   = 3'd6,
    CAUSE_EBREAK  = 3'd7
  } cause_e;

  // ------------------------------------------------------------- CODIF
  typedef enum logic [6:0] {
    I_LUI, I_AUIPC, I_JAL, I_JALR,
    I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU,
    I_LB, I_LH, I_LW, I_LBU, I_LHU,
    I_SB, I_SH, I_SW,
    I_ADDI, I_SLTI, I_SLTIU, I_XORI, I_ORI, I_ANDI, I_SLLI, I_SRLI, I_SRAI,
    I_ADD, I_SUB, I_SLL, I_SLT, I_SLTU, I_XOR, I_SRL, I_SRA, I_OR, I_AND,
    I_ECALL, I_EBREAK, I_MRET,
    I_CSRRW, I_CSRRS, I_CSRRC, I_CSRRWI, I_CSRRSI, I_CSRRCI,
    I_ILLEGAL = 7'h7F
  } codif_e;

  // ALU control code.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

endpackage

// hn07_pkg: constants and types shared by the HN-07 core and its peripherals.
//
// The HN-07 is an 8-bit Harvard RISC microcontroller with 14-bit instructions,
// a 5-stage pipeline and a set of PIC-style peripherals. The document gives
// the instruction width, the bank bits STATUS[7:5] and the list of peripherals,
// but not the opcode encoding or the register map. This package fixes both:
// the encoding is the 14-bit mid-range PIC encoding (35 instructions) and the
// special-function-register (SFR) map follows the PIC16C67 layout, the part the
// HN-07 is compared with. Both are this design's choices.
//
// Data addresses are 10 bits: {STATUS[7:5], f[6:0]}, eight banks of 128, as
// the document's address decode combines STATUS[7:5] with the address field.
// Offsets 0x00-0x3F of every bank are SFR space and offsets 0x40-0x7F are
// RAM, so the eight banks hold exactly the 512 bytes of data RAM. The common
// core registers (INDF, PCL, STATUS, FSR, PCLATH, INTCON) appear in every
// bank and are carried with bank bits 000 ("canonical" address) everywhere
// after the address-decode stage. The peripheral SFRs sit in banks 0 and 1.
package hn07_pkg;

  localparam int unsigned XLEN   = 8;   // data width
  localparam int unsigned ILEN   = 14;  // instruction width
  localparam int unsigned DADDR_W = 10; // data address width (8 banks)
  localparam int unsigned RAM_AW  = 9;  // RAM index width (512 bytes)

  typedef logic [DADDR_W-1:0] daddr_t;
  typedef logic [RAM_AW-1:0]  raddr_t;

  // ---- SFR map (canonical 9-bit addresses) ---------------------------------
  localparam daddr_t A_INDF    = 10'h000;
  localparam daddr_t A_TMR0    = 10'h001;
  localparam daddr_t A_PCL     = 10'h002;
  localparam daddr_t A_STATUS  = 10'h003;
  localparam daddr_t A_FSR     = 10'h004;
  localparam daddr_t A_PORTA   = 10'h005;
  localparam daddr_t A_PORTB   = 10'h006;
  localparam daddr_t A_PORTC   = 10'h007;
  localparam daddr_t A_PORTD   = 10'h008;
  localparam daddr_t A_PCLATH  = 10'h00A;
  localparam daddr_t A_INTCON  = 10'h00B;
  localparam daddr_t A_PIR1    = 10'h00C;
  localparam daddr_t A_TMR1L   = 10'h00E;
  localparam daddr_t A_TMR1H   = 10'h00F;
  localparam daddr_t A_T1CON   = 10'h010;
  localparam daddr_t A_TMR2    = 10'h011;
  localparam daddr_t A_T2CON   = 10'h012;
  localparam daddr_t A_CCPR1L  = 10'h015;
  localparam daddr_t A_CCPR1H  = 10'h016;
  localparam daddr_t A_CCP1CON = 10'h017;
  localparam daddr_t A_RCSTA   = 10'h018;
  localparam daddr_t A_TXREG   = 10'h019;
  localparam daddr_t A_RCREG   = 10'h01A;
  localparam daddr_t A_OPTION  = 10'h081;
  localparam daddr_t A_TRISA   = 10'h085;
  localparam daddr_t A_TRISB   = 10'h086;
  localparam daddr_t A_TRISC   = 10'h087;
  localparam daddr_t A_TRISD   = 10'h088;
  localparam daddr_t A_PIE1    = 10'h08C;
  localparam daddr_t A_PR2     = 10'h092;
  localparam daddr_t A_WDTCON  = 10'h097;
  localparam daddr_t A_TXSTA   = 10'h098;
  localparam daddr_t A_SPBRG   = 10'h099;

  // Registers that appear in every bank.
  function automatic logic is_common(input logic [6:0] f);
    return f == 7'h00 || f == 7'h02 || f == 7'h03 || f == 7'h04 ||
           f == 7'h0A || f == 7'h0B;
  endfunction

  // SFR space: the low 64 bytes of each bank.
  function automatic logic is_sfr(input daddr_t a);
    return !a[6];
  endfunction

  // RAM word of a data address in the upper half of a bank.
  function automatic raddr_t ram_index(input daddr_t a);
    return {a[9:7], a[5:0]};
  endfunction

  // STATUS bit positions (IRP RP1 RP0 TO PD Z DC C).
  localparam int unsigned S_C = 0, S_DC = 1, S_Z = 2, S_PD = 3, S_TO = 4;

  // Interrupt vector and reset vector.
  localparam logic [15:0] RESET_VEC = 16'h0000;
  localparam logic [15:0] INT_VEC   = 16'h0004;

  // ---- ALU ----------------------------------------------------------------
  typedef enum logic [4:0] {
    ALU_PASSF, ALU_PASSW, ALU_PASSK, ALU_CLR,
    ALU_ADD,   ALU_SUB,   ALU_AND,   ALU_IOR, ALU_XOR,
    ALU_COM,   ALU_INC,   ALU_DEC,   ALU_RRF, ALU_RLF, ALU_SWAP,
    ALU_BCF,   ALU_BSF,   ALU_BTST
  } alu_op_t;

  typedef enum logic [1:0] {SKIP_NONE, SKIP_IF_ZERO, SKIP_IF_NZ} skip_t;

  // Control word produced by the ALU-decode stage.
  typedef struct packed {
    alu_op_t    op;
    logic       use_lit;   // B operand is the 8-bit literal instead of f
    logic       rd_f;      // instruction reads file register f
    logic       we_f;      // result written to f
    logic       we_w;      // result written to W
    logic       upd_z;
    logic       upd_c;
    logic       upd_dc;
    skip_t      skip;
    logic       sleep;
    logic       clrwdt;
    logic       illegal;   // encoding not in the instruction set
  } ctrl_t;

endpackage

// octalynx_pkg: types and constants shared by the OctaLynx 8-bit RISC
// microcontroller.
//
// The internal main bus (8-bit data, 6-bit address, two control lines) is a
// struct here.  The 6-bit control-register map, the interrupt vector numbers
// and the ALU operation codes are collected in one place so that the core,
// the peripherals and the testbenches agree on them.
//
// Follows the document: the bus widths, the 6-bit control-register space that
// ends with the stack pointer and status register at 0x3F, the vector table
// order (RESET at 0x00 up to USART transmit complete at 0x0E), the three ALU
// groups.  Own choices: every register address other than SREG, all bit
// positions inside the peripheral registers, and the instruction encoding
// (see instruction_decoder.sv).
package octalynx_pkg;

  // ---------------------------------------------------------------- main bus
  typedef struct packed {
    logic [5:0] addr;  // 6-bit control-register address
    logic [7:0] wdata; // data written by the core
    logic       rd;    // read strobe
    logic       wr;    // write strobe
  } mbus_req_t;

  // ------------------------------------------------ control-register map (6-bit)
  localparam logic [5:0] A_PINA   = 6'h00, A_DDRA  = 6'h01, A_PORTA = 6'h02;
  localparam logic [5:0] A_PINB   = 6'h03, A_DDRB  = 6'h04, A_PORTB = 6'h05;
  localparam logic [5:0] A_PINC   = 6'h06, A_DDRC  = 6'h07, A_PORTC = 6'h08;
  localparam logic [5:0] A_SPCR   = 6'h09, A_SPSR  = 6'h0A, A_SPDR  = 6'h0B;
  localparam logic [5:0] A_UCSRA  = 6'h0C, A_UCSRB = 6'h0D, A_UBRR  = 6'h0E, A_UDR = 6'h0F;
  localparam logic [5:0] A_TCCR0  = 6'h10, A_TCNT0L = 6'h11, A_TCNT0H = 6'h12;
  localparam logic [5:0] A_OCR0AL = 6'h13, A_OCR0AH = 6'h14, A_OCR0BL = 6'h15, A_OCR0BH = 6'h16;
  localparam logic [5:0] A_ICR0L  = 6'h17, A_ICR0H = 6'h18;
  localparam logic [5:0] A_TCCR1  = 6'h19, A_TCNT1 = 6'h1A, A_OCR1 = 6'h1B;
  localparam logic [5:0] A_TCCR2  = 6'h1C, A_TCNT2 = 6'h1D, A_OCR2 = 6'h1E;
  localparam logic [5:0] A_TIMSK  = 6'h1F, A_TIFR  = 6'h20, A_EICR  = 6'h21;
  // 0x22 .. 0x3C are not decoded inside the chip: they reach the led-out bus.
  localparam logic [5:0] A_EXT_FIRST = 6'h22, A_EXT_LAST = 6'h3C;
  localparam logic [5:0] A_SPH    = 6'h3D, A_SPL   = 6'h3E, A_SREG  = 6'h3F;

  function automatic logic is_ext_addr(logic [5:0] a);
    return (a >= A_EXT_FIRST) && (a <= A_EXT_LAST);
  endfunction

  // ---------------------------------------------------------- interrupts
  // Vector numbers are program-memory word addresses (Table 1 of the source).
  localparam int NIRQ = 32;
  localparam int V_INT0 = 1, V_INT1 = 2, V_T0_CAPT = 3, V_T0_COMPA = 4,
                 V_T0_COMPB = 5, V_T0_OVF = 6, V_T1_COMP = 7, V_T1_OVF = 8,
                 V_T2_COMP = 9, V_T2_OVF = 10, V_SPI_STC = 11, V_USART_RXC = 12,
                 V_USART_UDRE = 13, V_USART_TXC = 14;

  // ---------------------------------------------------------- timers
  typedef enum logic [1:0] {
    TM_CTO = 2'd0,  // clear timer on overflow
    TM_CTC = 2'd1,  // clear timer on compare
    TM_PWM = 2'd2   // free running, output high while count < compare
  } tmode_e;

  // ---------------------------------------------------------- ALU
  typedef enum logic [1:0] {U_NONE = 2'd0, U_ARITH = 2'd1, U_LOGIC = 2'd2, U_BIT = 2'd3} aunit_e;

  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,  OP_ADC  = 5'd1,  OP_SUB  = 5'd2,  OP_SBC = 5'd3,
    OP_MUL  = 5'd4,  OP_INC  = 5'd5,  OP_DEC  = 5'd6,  OP_ADW = 5'd7,  OP_SBW = 5'd8,
    OP_AND  = 5'd9,  OP_OR   = 5'd10, OP_XOR  = 5'd11, OP_NOT = 5'd12,
    OP_CLR  = 5'd13, OP_SER  = 5'd14, OP_MOV  = 5'd15,
    OP_LSL  = 5'd16, OP_LSR  = 5'd17, OP_ROL  = 5'd18, OP_ROR = 5'd19, OP_ASR = 5'd20,
    OP_BCLR = 5'd21, OP_BSET = 5'd22, OP_SWAP = 5'd23, OP_MIR = 5'd24
  } aluop_e;

  function automatic aunit_e unit_of(aluop_e op);
    if (op <= OP_SBW) return U_ARITH;
    if (op <= OP_MOV) return U_LOGIC;
    return U_BIT;
  endfunction

  // Status register bit positions
  localparam int SR_C = 0, SR_Z = 1, SR_N = 2, SR_V = 3, SR_I = 7;

  typedef struct packed {
    logic v, n, z, c;
  } flags_t;

  // ---------------------------------------------------------- memory driver
  // Four memory control lines: {sel_ram, sel_pm, wr, rd}.
  // rd/wr with neither select = cycle of the led-out main bus.
  typedef enum logic [1:0] {MD_FETCH = 2'd0, MD_RAM_RD = 2'd1, MD_RAM_WR = 2'd2, MD_XBUS = 2'd3} mdop_e;
  localparam int MC_RD = 0, MC_WR = 1, MC_PM = 2, MC_RAM = 3;

endpackage

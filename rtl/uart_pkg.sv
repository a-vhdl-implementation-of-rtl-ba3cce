// uart_pkg: types and constants shared by the UART-with-BIST design.
//
// Holds the host register map, the line-control fields, the line-status
// bits and the four BILBO operating modes. The BILBO mode encoding
// (00 shift, 01 PRPG, 10 normal, 11 MISR) and the positions of OUT1/OUT2 in
// the modem control register (bits 2 and 3) follow the published design; the
// rest of the register map is this design's own choice, modelled on the
// classic 16550-style register set, with the data register at address 8.
package uart_pkg;

  // Host register addresses (4-bit address bus).
  typedef enum logic [3:0] {
    ADDR_IER = 4'h0,  // interrupt enable (rw)
    ADDR_LCR = 4'h1,  // line control (rw)
    ADDR_MCR = 4'h2,  // modem control (rw)
    ADDR_DLL = 4'h3,  // divisor latch, low byte (rw)
    ADDR_DLM = 4'h4,  // divisor latch, high byte (rw)
    ADDR_LSR = 4'h5,  // line status (r, error bits clear on read)
    ADDR_MSR = 4'h6,  // modem status (r, delta bits clear on read)
    ADDR_ISR = 4'h7,  // pending interrupt sources (r)
    ADDR_DAT = 4'h8   // write: transmit hold register, read: receive hold register
  } reg_addr_e;

  // Line control register.
  typedef struct packed {
    logic       rsvd7;
    logic       brk;    // 1: force txd low (line break generation)
    logic       rsvd5;
    logic       eps;    // 1: even parity, 0: odd parity
    logic       pen;    // 1: parity bit generated and checked
    logic       stb;    // 0: one stop bit, 1: two stop bits
    logic [1:0] wls;    // word length: 00=5, 01=6, 10=7, 11=8 bits
  } lcr_t;

  localparam lcr_t LCR_RESET = '{rsvd7: 1'b0, brk: 1'b0, rsvd5: 1'b0, eps: 1'b0,
                                 pen: 1'b0, stb: 1'b0, wls: 2'b11};  // 8N1

  // Modem control register.
  typedef struct packed {
    logic [2:0] rsvd;
    logic       loop;   // internal loopback (diagnostics, BIST)
    logic       out2;   // bit 3: drives out2 pin low when set
    logic       out1;   // bit 2: drives out1 pin low when set
    logic       rts;    // drives rts pin low when set
    logic       dtr;    // drives dtr pin low when set
  } mcr_t;

  // Status reported by the receiver.
  typedef struct packed {
    logic dr;   // data ready in the receive hold register
    logic oe;   // overrun error
    logic pe;   // parity error
    logic fe;   // framing error
    logic bi;   // break interrupt
  } rx_status_t;

  // Interrupt enable register bits.
  localparam int IER_RX   = 0;  // receive data ready
  localparam int IER_THRE = 1;  // transmit hold register empty
  localparam int IER_LS   = 2;  // line status (oe, pe, fe, bi)
  localparam int IER_MS   = 3;  // modem status change

  // BILBO operating modes, written B1B2.
  typedef enum logic [1:0] {
    BILBO_SHIFT  = 2'b00,
    BILBO_PRPG   = 2'b01,
    BILBO_NORMAL = 2'b10,
    BILBO_MISR   = 2'b11
  } bilbo_mode_e;

endpackage

// pliu_pkg: types and constants shared by the programmable line interface
// unit (PLIU) and the communications processing system (CPS) around it.
//
// The PLIU microprocessor has a 16-bit byte address space split into six
// regions (ROM, local RAM, micro-operation decodes, relocatable common
// memory, interlock memory, absolute common memory). The region sizes are
// the design's (4k, 16k, 4k, 4k, 4k, 32k); their order in the address space
// is this design's own choice. The CPS word is 12 bits and its memory holds
// up to 256k words (18-bit word address). Character codes for the
// time-multiplexed stream (idle 233 octal, break 037 octal) follow the
// design; the transparent-text escape codes are the usual DLE/STX/ETX, and
// synchronous messages use SOH/STX to open and ETX/ETB to close a message,
// with a CRC-16 checkword (polynomial x^16+x^15+x^2+1, bits taken least
// significant first, starting from zero). These codes and the checkword are
// this design's choice.
package pliu_pkg;

  localparam int unsigned PADDR_W  = 16;  // microprocessor address width
  localparam int unsigned PDATA_W  = 8;   // microprocessor data width
  localparam int unsigned CPS_W    = 12;  // CPS word width
  localparam int unsigned CADDR_W  = 18;  // CPS word address (256k words)
  localparam int unsigned ID_W     = 5;   // processor identifier (CPS + 18 PLIUs)

  // Address map (base addresses of the six regions)
  localparam logic [15:0] ROM_BASE    = 16'h0000; // 4k  : vectors, restart, debug
  localparam logic [15:0] RAM_BASE    = 16'h1000; // 16k : local slave RAM
  localparam logic [15:0] UOP_BASE    = 16'h5000; // 4k  : micro-operation decodes
  localparam logic [15:0] RELOC_BASE  = 16'h6000; // 4k  : relocatable common memory
  localparam logic [15:0] ILOCK_BASE  = 16'h7000; // 4k  : interlock memory
  localparam logic [15:0] ABS_BASE    = 16'h8000; // 32k : absolute common memory

  typedef enum logic [2:0] {
    SP_ROM       = 3'd0,
    SP_RAM       = 3'd1,
    SP_UOP       = 3'd2,
    SP_RELOC     = 3'd3,
    SP_ILOCK     = 3'd4,
    SP_ABS       = 3'd5
  } space_e;

  // Operation carried in the control phase of a multiplexer-bus reference
  typedef enum logic [1:0] {
    MOP_READ      = 2'd0,
    MOP_WRITE     = 2'd1,
    MOP_ILK_TEST  = 2'd2,  // interlock conditional destructive read
    MOP_ILK_RESET = 2'd3   // interlock reset
  } mop_e;

  // Phases of one reference on the time-multiplexed bus (one slot)
  typedef enum logic [1:0] {
    PH_CTRL = 2'd0,  // control word: operation + high address bits
    PH_ADDR = 2'd1,  // low 12 address bits
    PH_DATA = 2'd2   // data word (write: PLIU drives; read: memory drives)
  } phase_e;

  // Serial clock source of a line
  typedef enum logic [1:0] {
    CLK_ASYNC    = 2'd0,  // internal baud-rate generator
    CLK_SYNC     = 2'd1,  // modem supplied transmit/receive clocks
    CLK_LOOPBACK = 2'd2   // internal clock, transmitter looped to receiver
  } clk_mode_e;

  // Character codes
  localparam logic [7:0] CODE_IDLE  = 8'o233;  // synchronous idle
  localparam logic [7:0] CODE_BREAK = 8'o037;  // break
  localparam logic [7:0] CODE_DLE   = 8'h10;
  localparam logic [7:0] CODE_STX   = 8'h02;
  localparam logic [7:0] CODE_ETX   = 8'h03;
  localparam logic [7:0] CODE_SOH   = 8'h01;
  localparam logic [7:0] CODE_ETB   = 8'h17;

  // CRC-16 checkword of synchronous messages, advanced by one byte. Each
  // bit, least significant first, is XORed into bit 0; when the result is
  // one the register shifts right and takes the reversed polynomial A001.
  function automatic logic [15:0] crc16_next(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 8; i++)
      c = (c[0] ^ b[i]) ? ((c >> 1) ^ 16'hA001) : (c >> 1);
    return c;
  endfunction

  // Class of a byte in the time-multiplexed input stream
  typedef enum logic [1:0] {
    CC_IDLE = 2'd0,
    CC_DATA = 2'd1,
    CC_CTRL = 2'd2
  } code_class_e;

  function automatic code_class_e classify(input logic [7:0] c);
    if (c == CODE_IDLE)                      return CC_IDLE;
    else if (c == CODE_BREAK || c[7] == 1'b1) return CC_CTRL;
    else                                     return CC_DATA;
  endfunction

  // An I/O command: CPS word address and length in bytes of one data block
  typedef struct packed {
    logic [CADDR_W-1:0] addr;
    logic [11:0]        len;
  } ioc_t;

endpackage

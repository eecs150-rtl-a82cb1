// Shared types and constants of the UART/CPU adaptor system.
//
// The CPU sees the adaptor as four 32-bit words of memory starting at
// 0xffff_0000 (register map below). The request a CPU puts on its data-memory
// port in one cycle is bundled into cpu_req_t: an address, the write data and
// the MemRead/MemWrite strobes. The read data returns on a separate 32-bit bus
// one clock later (see uart_cpu_adaptor).
//
// The register map, the register widths, the trigger sequence "cs150" and the
// reply "Dusk till Dawn\n" follow the lab description. The struct bundling and
// the one-cycle read latency are this design's own choices.
package uart_cpu_pkg;

  localparam int unsigned CPU_DW = 32;  // CPU address and data bus width
  localparam int unsigned BYTE_W = 8;   // width of DataInReg / DataOutReg

  // Register map (byte addresses)
  localparam logic [CPU_DW-1:0] ADAPTOR_BASE  = 32'hffff_0000;
  localparam logic [3:0]        OFS_CTRL_IN   = 4'h0;  // ControlInReg  (Ready bit, UART->CPU)
  localparam logic [3:0]        OFS_DATA_IN   = 4'h4;  // DataInReg     (byte from UART)
  localparam logic [3:0]        OFS_CTRL_OUT  = 4'h8;  // ControlOutReg (Ready bit, CPU->UART)
  localparam logic [3:0]        OFS_DATA_OUT  = 4'hc;  // DataOutReg    (byte to UART)

  // One cycle of CPU data-memory request (lw drives mem_read, sw drives mem_write)
  typedef struct packed {
    logic [CPU_DW-1:0] addr;
    logic [CPU_DW-1:0] wdata;
    logic              mem_read;
    logic              mem_write;
  } cpu_req_t;

  // Echo program: typing TRIGGER makes the emulator send REPLY.
  localparam int unsigned           TRIGGER_LEN = 5;
  localparam logic [TRIGGER_LEN*8-1:0] TRIGGER  = "cs150";
  localparam int unsigned           REPLY_LEN   = 15;
  localparam logic [REPLY_LEN*8-1:0]   REPLY    = "Dusk till Dawn\n";

  // i-th character (0 = first) of the trigger sequence
  function automatic logic [7:0] trigger_char(input int unsigned i);
    return TRIGGER[(TRIGGER_LEN-1-i)*8 +: 8];
  endfunction

  // i-th character (0 = first) of the reply message
  function automatic logic [7:0] reply_char(input int unsigned i);
    return REPLY[(REPLY_LEN-1-i)*8 +: 8];
  endfunction

endpackage

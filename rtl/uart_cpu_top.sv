// Top level of the UART echo system: the CPU emulator talks through its
// data-memory port to the UART/CPU adaptor, and the adaptor's UART side is
// brought out as ports, where the serial UART (8 data bits, no parity, 1 stop
// bit, 115200 baud, supplied separately) connects with its ready/valid
// byte ports:
//   uart_dout / uart_dout_valid / uart_dout_ready : bytes the UART received
//   uart_din  / uart_din_valid  / uart_din_ready  : bytes for the UART to send
// Every byte offered on uart_dout comes back on uart_din; after the bytes
// "cs150" the top also sends "Dusk till Dawn\n". The emulator's memory bus is
// brought out for observation (cpu_req, cpu_rdata), and reply_active is high
// while the reply is being sent. clk and the synchronous active-high rst feed
// both blocks.
//
// The composition follows the lab's block diagram (UART, adaptor, processor
// emulator); taking the UART outside the top is this design's choice.
module uart_cpu_top
  import uart_cpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [BYTE_W-1:0] uart_dout,
  input  logic              uart_dout_valid,
  output logic              uart_dout_ready,
  output logic [BYTE_W-1:0] uart_din,
  output logic              uart_din_valid,
  input  logic              uart_din_ready,
  output cpu_req_t          cpu_req,
  output logic [CPU_DW-1:0] cpu_rdata,
  output logic              reply_active
);

  cpu_emulator #(.BASE_ADDR(ADAPTOR_BASE)) u_cpu (
    .clk, .rst,
    .cpu_req, .cpu_rdata,
    .reply_active
  );

  uart_cpu_adaptor #(.BASE_ADDR(ADAPTOR_BASE)) u_adaptor (
    .clk, .rst,
    .cpu_req, .cpu_rdata,
    .uart_dout, .uart_dout_valid, .uart_dout_ready,
    .uart_din, .uart_din_valid, .uart_din_ready
  );

endmodule

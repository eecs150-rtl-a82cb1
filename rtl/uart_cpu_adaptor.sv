// UART/CPU adaptor: memory-mapped I/O bridge between a CPU data-memory port
// and the ready/valid byte ports of a UART.
//
// Four registers, at BASE_ADDR + 0x0, 0x4, 0x8, 0xc:
//   ControlInReg  (1 bit)  Ready: a received byte is waiting in DataInReg
//   DataInReg     (8 bits) last byte received by the UART
//   ControlOutReg (1 bit)  Ready: DataOutReg is free, the CPU may write it
//   DataOutReg    (8 bits) byte the CPU wants transmitted
// The Ready bits are never written by the CPU. They change "behind the
// scenes":
//   * UART -> CPU: the adaptor raises uart_dout_ready only while ControlInReg
//     is clear. A ready/valid transfer loads DataInReg and sets ControlInReg;
//     a CPU read of DataInReg clears it again.
//   * CPU -> UART: a CPU write of DataOutReg clears ControlOutReg, which
//     drives uart_din_valid high. When the UART accepts the byte (valid and
//     ready both high) ControlOutReg is set again.
// So each direction is a one-entry buffer and no byte can be lost as long as
// the CPU polls the Ready bits before reading or writing data.
//
// CPU interface: cpu_req carries address, write data, MemRead and MemWrite.
// Reads are synchronous: the word addressed in cycle t appears on cpu_rdata
// in cycle t+1, zero-extended from the 1- or 8-bit register. When the
// previous cycle was no read of this adaptor cpu_rdata is zero, so several
// devices can share one read bus with an OR. Writes to the control
// registers, and to DataInReg, are ignored.
//
// The register map, register widths and set/clear rules follow the lab
// description; the read latency, the zero read data outside the range, the
// synchronous active-high reset and the reset values (ControlInReg = 0,
// ControlOutReg = 1) are this design's choices.
module uart_cpu_adaptor
  import uart_cpu_pkg::*;
#(
  parameter logic [CPU_DW-1:0] BASE_ADDR = ADAPTOR_BASE
) (
  input  logic              clk,
  input  logic              rst,
  // CPU side
  input  cpu_req_t          cpu_req,
  output logic [CPU_DW-1:0] cpu_rdata,
  // UART receive side (UART DataOut / DataOutValid / DataOutReady)
  input  logic [BYTE_W-1:0] uart_dout,
  input  logic              uart_dout_valid,
  output logic              uart_dout_ready,
  // UART transmit side (UART DataIn / DataInValid / DataInReady)
  output logic [BYTE_W-1:0] uart_din,
  output logic              uart_din_valid,
  input  logic              uart_din_ready
);

  logic              control_in_reg;   // Ready: byte waiting for the CPU
  logic [BYTE_W-1:0] data_in_reg;
  logic              control_out_reg;  // Ready: CPU may write DataOutReg
  logic [BYTE_W-1:0] data_out_reg;

  // Address decode: word address inside the 16-byte window
  logic       hit;
  logic [3:0] ofs;
  assign hit = (cpu_req.addr[CPU_DW-1:4] == BASE_ADDR[CPU_DW-1:4]);
  assign ofs = {cpu_req.addr[3:2], 2'b00};

  logic rd_data_in, wr_data_out, rx_fire, tx_fire;
  assign rd_data_in  = cpu_req.mem_read  && hit && (ofs == OFS_DATA_IN);
  assign wr_data_out = cpu_req.mem_write && hit && (ofs == OFS_DATA_OUT);
  assign rx_fire     = uart_dout_valid && uart_dout_ready;
  assign tx_fire     = uart_din_valid  && uart_din_ready;

  // UART-facing handshake signals come straight from the Ready bits
  assign uart_dout_ready = !control_in_reg;
  assign uart_din_valid  = !control_out_reg;
  assign uart_din        = data_out_reg;

  // UART -> CPU
  always_ff @(posedge clk) begin
    if (rst) begin
      control_in_reg <= 1'b0;
      data_in_reg    <= '0;
    end else if (rx_fire) begin
      control_in_reg <= 1'b1;
      data_in_reg    <= uart_dout;
    end else if (rd_data_in) begin
      control_in_reg <= 1'b0;
    end
  end

  // CPU -> UART. A write in the same cycle as the UART takes the old byte
  // leaves the new byte pending, so the write has priority.
  always_ff @(posedge clk) begin
    if (rst) begin
      control_out_reg <= 1'b1;
      data_out_reg    <= '0;
    end else if (wr_data_out) begin
      control_out_reg <= 1'b0;
      data_out_reg    <= cpu_req.wdata[BYTE_W-1:0];
    end else if (tx_fire) begin
      control_out_reg <= 1'b1;
    end
  end

  // Registered read port
  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_rdata <= '0;
    end else if (cpu_req.mem_read && hit) begin
      unique case (ofs)
        OFS_CTRL_IN:  cpu_rdata <= {{(CPU_DW-1){1'b0}}, control_in_reg};
        OFS_DATA_IN:  cpu_rdata <= {{(CPU_DW-BYTE_W){1'b0}}, data_in_reg};
        OFS_CTRL_OUT: cpu_rdata <= {{(CPU_DW-1){1'b0}}, control_out_reg};
        default:      cpu_rdata <= {{(CPU_DW-BYTE_W){1'b0}}, data_out_reg};
      endcase
    end else begin
      cpu_rdata <= '0;
    end
  end

  // Handshake rules
  // The byte offered to the UART stays put until it is taken, unless the CPU
  // overwrites it (which the next property forbids).
  a_din_stable: assert property (@(posedge clk) disable iff (rst)
    (uart_din_valid && !uart_din_ready && !wr_data_out) |=> (uart_din_valid && $stable(uart_din)))
    else $error("uart_cpu_adaptor: transmit byte changed before the UART took it");
  // Back pressure: the CPU must not write DataOutReg while its Ready bit is low
  // (an accept in the same cycle frees the register).
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    wr_data_out |-> (control_out_reg || tx_fire))
    else $error("uart_cpu_adaptor: DataOutReg written while ControlOutReg Ready was low");
  // The CPU never writes the control registers.
  a_no_ctrl_write: assert property (@(posedge clk) disable iff (rst)
    (cpu_req.mem_write && hit) |-> (ofs == OFS_DATA_OUT))
    else $error("uart_cpu_adaptor: write to a read-only adaptor register");

endmodule

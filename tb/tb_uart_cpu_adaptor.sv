// Self-checking testbench of uart_cpu_adaptor.
//
// Directed part: reset values, one byte each way with the Ready bits set and
// cleared behind the scenes, DataOutReady dropping right after a receive
// handshake, and the one-cycle read latency.
// Random part: random CPU reads of all four registers, random DataOutReg
// writes that respect back pressure (only while ControlOutReg reads Ready, or
// in the cycle the UART takes the pending byte), random UART valid/ready.
// Every cycle the outputs are compared with a reference model of the four
// registers kept here, and at the end no byte was lost or duplicated in
// either direction.
module tb_uart_cpu_adaptor;
  import uart_cpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  cpu_req_t          cpu_req;
  logic [CPU_DW-1:0] cpu_rdata;
  logic [7:0]        uart_dout;
  logic              uart_dout_valid, uart_dout_ready;
  logic [7:0]        uart_din;
  logic              uart_din_valid, uart_din_ready;

  uart_cpu_adaptor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cpu_req_t rd(input logic [3:0] ofs);
    cpu_req_t r = '0;
    r.addr = ADAPTOR_BASE | 32'(ofs);
    r.mem_read = 1'b1;
    return r;
  endfunction

  function automatic cpu_req_t wr(input logic [3:0] ofs, input logic [31:0] d);
    cpu_req_t r = '0;
    r.addr = ADAPTOR_BASE | 32'(ofs);
    r.wdata = d;
    r.mem_write = 1'b1;
    return r;
  endfunction

  // Reference model
  logic        m_cin, m_cout;
  logic [7:0]  m_din, m_dout;
  logic [31:0] m_rdata;

  // Byte bookkeeping for the loss check
  byte unsigned rx_sent[$], rx_got[$], tx_sent[$], tx_got[$];

  task automatic model_reset();
    m_cin = 0; m_cout = 1; m_din = 0; m_dout = 0; m_rdata = 0;
  endtask

  // Apply one clock edge of the model with the inputs currently driven
  task automatic model_step();
    logic hit;
    logic [3:0] ofs;
    logic rx, tx, rdi, wdo;
    logic [31:0] nr;
    hit = cpu_req.addr[31:4] == 28'hffff000;
    ofs = {cpu_req.addr[3:2], 2'b00};
    rx  = uart_dout_valid && !m_cin;
    tx  = !m_cout && uart_din_ready;
    rdi = cpu_req.mem_read && hit && ofs == 4'h4;
    wdo = cpu_req.mem_write && hit && ofs == 4'hc;
    nr = 0;
    if (cpu_req.mem_read && hit)
      case (ofs)
        4'h0: nr = {31'b0, m_cin};
        4'h4: nr = {24'b0, m_din};
        4'h8: nr = {31'b0, m_cout};
        default: nr = {24'b0, m_dout};
      endcase
    m_rdata = nr;
    if (rx) begin m_cin = 1; m_din = uart_dout; end
    else if (rdi) m_cin = 0;
    if (wdo) begin m_cout = 0; m_dout = cpu_req.wdata[7:0]; end
    else if (tx) m_cout = 1;
  endtask

  task automatic compare_outputs();
    check(uart_dout_ready == !m_cin, "uart_dout_ready");
    check(uart_din_valid == !m_cout, "uart_din_valid");
    if (!m_cout) check(uart_din == m_dout, "uart_din");
    check(cpu_rdata == m_rdata, $sformatf("cpu_rdata %h exp %h", cpu_rdata, m_rdata));
  endtask

  // One cycle: inputs already driven (after negedge); compare, then step
  task automatic cycle();
    #1;
    compare_outputs();
    if (uart_dout_valid && uart_dout_ready) rx_sent.push_back(uart_dout);
    if (uart_din_valid && uart_din_ready) tx_got.push_back(uart_din);
    if (cpu_req.mem_read && cpu_req.addr == (ADAPTOR_BASE | 32'h4) && m_cin) rx_got.push_back(m_din);
    if (cpu_req.mem_write && cpu_req.addr == (ADAPTOR_BASE | 32'hc)) tx_sent.push_back(cpu_req.wdata[7:0]);
    @(posedge clk);
    model_step();
    @(negedge clk);
  endtask

  task automatic idle_inputs();
    cpu_req = '0; uart_dout = 0; uart_dout_valid = 0; uart_din_ready = 0;
  endtask

  initial begin
    static int n_stall = 0, n_backpressure = 0, n_same_cycle = 0;
    idle_inputs();
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    model_reset();

    // ---- Directed: reset values
    check(uart_dout_ready == 1, "reset: DataOutReady high (DataInReg empty)");
    check(uart_din_valid == 0, "reset: DataInValid low (DataOutReg free)");
    cpu_req = rd(4'h0); cycle();
    cpu_req = rd(4'h8);
    check(cpu_rdata == 32'd0, "reset: ControlInReg reads 0");
    cycle();
    cpu_req = '0;
    check(cpu_rdata == 32'd1, "reset: ControlOutReg reads 1");
    cycle();
    check(cpu_rdata == 32'd0, "rdata zero after a cycle without read");

    // ---- Directed: UART -> CPU
    uart_dout = 8'h5a; uart_dout_valid = 1;
    check(uart_dout_ready, "ready before receive");
    cycle();                                   // handshake {valid,ready}=11
    check(uart_dout_ready == 0, "DataOutReady low right after the handshake");
    uart_dout = 8'hff;                         // UART offers another byte; must wait
    cpu_req = rd(4'h0); cycle();
    check(cpu_rdata == 32'd1, "ControlInReg Ready set by the UART");
    cpu_req = rd(4'h4); cycle();
    check(cpu_rdata == 32'h5a, "DataInReg holds the received byte, one cycle after the read");
    check(uart_dout_ready == 1, "ControlInReg cleared implicitly by the read of DataInReg");
    cpu_req = rd(4'h0); cycle();               // 0xff is taken in this cycle
    uart_dout_valid = 0;
    cpu_req = rd(4'h0);
    check(cpu_rdata == 32'd0, "ControlInReg reads 0 after the read of DataInReg");
    cycle();
    check(cpu_rdata == 32'd1, "ControlInReg set again by the waiting byte");
    cpu_req = rd(4'h4); cycle();
    cpu_req = '0;
    check(cpu_rdata == 32'hff, "second byte received after ready returned");
    cycle();

    // ---- Directed: CPU -> UART
    cpu_req = wr(4'hc, 32'hdead_be41); cycle();
    cpu_req = '0;
    check(uart_din_valid == 1 && uart_din == 8'h41, "write of DataOutReg offers the byte to the UART");
    cpu_req = rd(4'h8); cycle();
    cpu_req = '0;
    check(cpu_rdata == 32'd0, "ControlOutReg Ready cleared by the write");
    repeat (3) begin
      check(uart_din_valid == 1 && uart_din == 8'h41, "byte held while the UART is busy");
      cycle();
    end
    uart_din_ready = 1; cycle();
    uart_din_ready = 0;
    check(uart_din_valid == 0, "UART took the byte");
    cpu_req = rd(4'h8); cycle();
    cpu_req = '0;
    check(cpu_rdata == 32'd1, "ControlOutReg Ready set again when the UART read the byte");
    cycle();

    // ---- Random
    rx_sent.delete(); rx_got.delete(); tx_sent.delete(); tx_got.delete();
    for (int i = 0; i < 20000; i++) begin
      int r;
      logic tx_now;
      idle_inputs();
      uart_dout_valid = ($urandom_range(0, 2) == 0);
      uart_dout       = 8'($urandom);
      uart_din_ready  = ($urandom_range(0, 3) == 0);
      tx_now = !m_cout && uart_din_ready;
      r = $urandom_range(0, 9);
      if (r < 5) cpu_req = rd(4'($urandom_range(0, 3) * 4));
      else if (r < 8 && (m_cout || tx_now)) begin
        cpu_req = wr(4'hc, $urandom);
        if (tx_now) n_same_cycle++;
      end
      if (uart_dout_valid && m_cin) n_stall++;
      if (!m_cout && !uart_din_ready) n_backpressure++;
      cycle();
    end
    idle_inputs();
    // drain
    uart_din_ready = 1; cycle(); cycle();
    uart_din_ready = 0;
    if (m_cin) begin
      cpu_req = rd(4'h4); cycle(); cpu_req = '0; cycle();
    end

    check(rx_sent.size() > 1000 && rx_sent == rx_got, "every received byte reached the CPU once, in order");
    check(tx_sent.size() > 1000 && tx_sent == tx_got, "every written byte reached the UART once, in order");
    check(n_stall > 0, "receive side stalled the UART at least once");
    check(n_backpressure > 0, "transmit side held a byte for the UART at least once");
    check(n_same_cycle > 0, "write in the same cycle as a UART accept happened");
    $display("rx bytes %0d, tx bytes %0d, stalls %0d, held %0d, same-cycle %0d",
             rx_sent.size(), tx_sent.size(), n_stall, n_backpressure, n_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

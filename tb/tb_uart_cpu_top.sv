// End-to-end testbench of uart_cpu_top, at its default (and only)
// configuration.
//
// Models of the UART's two byte ports surround the top. The receive model
// offers bytes, as if typed at a terminal, holding DataOutValid until the
// adaptor takes each one. The transmit model accepts a byte and then stays
// busy for a while, as a serial transmitter would. The test runs two phases:
//   1. fast: random gaps of 0..30 cycles between input bytes and random
//      transmit times of 0..50 cycles, over a few thousand bytes;
//   2. line rate: bytes every 8680 cycles and 8680-cycle transmit times,
//      i.e. 10 bit times of 115200 baud with a 100 MHz clock, typing "cs150".
// The output is compared with the input echoed byte by byte plus
// "Dusk till Dawn\n" after each "cs150". Each mechanism of the design is
// counted and must occur: echo, reply, transmit back pressure (a poll of
// ControlOutReg that finds it busy), an empty receive poll, the receive side
// holding off the UART, and DataOutReady dropping right after every
// {DataOutValid, DataOutReady} = 2'b11 handshake.
module tb_uart_cpu_top;
  import uart_cpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [7:0]        uart_dout;
  logic              uart_dout_valid, uart_dout_ready;
  logic [7:0]        uart_din;
  logic              uart_din_valid, uart_din_ready;
  cpu_req_t          cpu_req;
  logic [CPU_DW-1:0] cpu_rdata;
  logic              reply_active;

  uart_cpu_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART model settings
  int rx_gap_max, tx_busy_min, tx_busy_max;

  byte unsigned rx_q[$], out_got[$], sent[$];
  int rx_gap, tx_busy;

  // Mechanism counters
  int n_echo, n_reply, n_busy_polls, n_empty_polls, n_rx_stall, n_trigger11;
  logic prev_fire;
  logic prev_rd_ctrl_out, prev_rd_ctrl_in;

  // Receive model: DataOut/DataOutValid of the UART
  always @(posedge clk) begin
    if (rst) begin
      uart_dout_valid <= 0; uart_dout <= 0; rx_gap <= 5;
    end else begin
      if (uart_dout_valid && uart_dout_ready) begin
        sent.push_back(uart_dout);
        uart_dout_valid <= 0;
        rx_gap <= $urandom_range(0, rx_gap_max);
      end else if (!uart_dout_valid) begin
        if (rx_gap > 0) rx_gap <= rx_gap - 1;
        else if (rx_q.size() > 0) begin
          uart_dout <= rx_q.pop_front();
          uart_dout_valid <= 1;
        end
      end
    end
  end

  // Transmit model: DataIn/DataInReady of the UART
  always @(posedge clk) begin
    if (rst) begin
      uart_din_ready <= 0; tx_busy <= 2;
    end else begin
      if (uart_din_valid && uart_din_ready) begin
        out_got.push_back(uart_din);
        uart_din_ready <= 0;
        tx_busy <= $urandom_range(tx_busy_min, tx_busy_max);
      end else if (!uart_din_ready) begin
        if (tx_busy > 0) tx_busy <= tx_busy - 1;
        else uart_din_ready <= 1;
      end
    end
  end

  // Observers
  always @(posedge clk) begin
    if (rst) begin
      prev_fire <= 0; prev_rd_ctrl_out <= 0; prev_rd_ctrl_in <= 0;
    end else begin
      if (prev_fire) check(!uart_dout_ready, "DataOutReady low after a receive handshake");
      prev_fire <= uart_dout_valid && uart_dout_ready;
      if (uart_dout_valid && uart_dout_ready) n_trigger11++;
      if (uart_dout_valid && !uart_dout_ready) n_rx_stall++;
      if (prev_rd_ctrl_out && cpu_rdata[0] == 0) n_busy_polls++;
      if (prev_rd_ctrl_in && cpu_rdata[0] == 0) n_empty_polls++;
      prev_rd_ctrl_out <= cpu_req.mem_read && cpu_req.addr == (ADAPTOR_BASE | 32'h8);
      prev_rd_ctrl_in  <= cpu_req.mem_read && cpu_req.addr == ADAPTOR_BASE;
      if (cpu_req.mem_write)
        check(cpu_req.addr == (ADAPTOR_BASE | 32'hc), "CPU writes only DataOutReg");
    end
  end

  function automatic void expected_of(input byte unsigned in[$], output byte unsigned exp[$],
                                      output int replies);
    byte unsigned hist[$];
    string msg = "Dusk till Dawn\n";
    exp.delete();
    replies = 0;
    foreach (in[i]) begin
      exp.push_back(in[i]);
      hist.push_back(in[i]);
      if (hist.size() > 5) void'(hist.pop_front());
      if (hist.size() == 5 && hist[0] == "c" && hist[1] == "s" && hist[2] == "1" &&
          hist[3] == "5" && hist[4] == "0") begin
        for (int k = 0; k < msg.len(); k++) exp.push_back(msg[k]);
        hist.delete();
        replies++;
      end
    end
  endfunction

  task automatic run_phase(input byte unsigned stim[$], input string name, input int max_cycles);
    byte unsigned exp[$];
    int replies, t;
    expected_of(stim, exp, replies);
    out_got.delete(); sent.delete();
    rx_q = stim;
    t = 0;
    while (out_got.size() < exp.size() && t < max_cycles) begin
      @(posedge clk);
      t++;
    end
    repeat (100) @(posedge clk);
    check(sent == stim, {name, ": every input byte was taken by the adaptor"});
    check(out_got.size() == exp.size(),
          $sformatf("%s: %0d output bytes, expected %0d", name, out_got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < out_got.size(); i++)
      check(out_got[i] == exp[i], $sformatf("%s: output byte %0d %h, expected %h", name, i, out_got[i], exp[i]));
    n_echo  += stim.size();
    n_reply += replies;
    $display("%s: %0d bytes in, %0d bytes out, %0d replies, %0d cycles", name, stim.size(),
             out_got.size(), replies, t);
  endtask

  initial begin
    byte unsigned stim[$];
    string s;
    n_echo = 0; n_reply = 0; n_busy_polls = 0; n_empty_polls = 0; n_rx_stall = 0; n_trigger11 = 0;
    rx_gap_max = 30; tx_busy_min = 0; tx_busy_max = 50;
    rst = 1;
    repeat (4) @(posedge clk);
    rst = 0;

    // Phase 1: fast random traffic
    s = "echo test, then cs150 and ccs150 and cs1cs150\n";
    for (int i = 0; i < s.len(); i++) stim.push_back(s[i]);
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 7);
      if (r == 0) begin
        s = "cs150";
        for (int k = 0; k < 5; k++) stim.push_back(s[k]);
      end else if (r < 4) begin
        s = "cs150";
        stim.push_back(s[$urandom_range(0, 4)]);
      end else stim.push_back(8'($urandom));
    end
    run_phase(stim, "fast", 1500000);

    // Phase 2: serial line rate, 115200 baud at 100 MHz, 10 bits per byte
    rx_gap_max = 8680; tx_busy_min = 8680; tx_busy_max = 8680;
    stim.delete();
    s = "cs150";
    for (int i = 0; i < s.len(); i++) stim.push_back(s[i]);
    run_phase(stim, "line rate", 1000000);

    check(n_echo > 0, "echo happened");
    check(n_reply > 0, "reply to cs150 happened");
    check(n_busy_polls > 0, "transmit back pressure happened");
    check(n_empty_polls > 0, "empty receive poll happened");
    check(n_rx_stall > 0, "receive side held off the UART");
    check(n_trigger11 > 0, "receive handshake {valid,ready}=11 happened");
    $display("echo %0d, replies %0d, busy polls %0d, empty polls %0d, rx stalls %0d, rx handshakes %0d",
             n_echo, n_reply, n_busy_polls, n_empty_polls, n_rx_stall, n_trigger11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

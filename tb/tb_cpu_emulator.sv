// Self-checking testbench of cpu_emulator.
//
// A memory-mapped device model here stands in for the adaptor: it answers
// reads one cycle later, delivers input bytes after random delays and takes
// each written byte only after a random "transmit" time, so the emulator sees
// both an empty receive side and transmit back pressure. Checks:
//   * DataInReg is only read after a poll of ControlInReg returned Ready, and
//     DataOutReg only written after a poll of ControlOutReg returned Ready
//     (one read per Ready, one write per Ready);
//   * no access outside the four registers, no write of a control register;
//   * the bytes written equal the input bytes, each echoed once, with
//     "Dusk till Dawn\n" after every occurrence of "cs150";
//   * a poll loop of the Ready bit repeats every two cycles.
module tb_cpu_emulator;
  import uart_cpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  cpu_req_t          cpu_req;
  logic [CPU_DW-1:0] cpu_rdata;
  logic              reply_active;

  cpu_emulator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Device model state
  byte unsigned in_q[$], out_got[$], expected[$];
  logic        cin, cout;
  logic [7:0]  din;
  int          cin_delay, cout_delay;
  logic        may_read_data, may_write;
  int          n_empty_polls, n_full_polls, n_replies, n_reply_cycles;
  int          last_poll_out_cycle, cycle_no;
  logic        prev_was_fail_poll_out;
  bit          done;

  // Expected output: echo every byte, reply after each "cs150"
  task automatic build_expected();
    byte unsigned hist[$];
    expected.delete();
    foreach (in_q[i]) begin
      expected.push_back(in_q[i]);
      hist.push_back(in_q[i]);
      if (hist.size() > 5) void'(hist.pop_front());
      if (hist.size() == 5 && hist[0] == "c" && hist[1] == "s" && hist[2] == "1" &&
          hist[3] == "5" && hist[4] == "0") begin
        string msg = "Dusk till Dawn\n";
        for (int k = 0; k < msg.len(); k++) expected.push_back(msg[k]);
        hist.delete();
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      cin <= 0; cout <= 1; din <= 0; cpu_rdata <= 0;
      cin_delay <= 3; cout_delay <= 0;
      may_read_data <= 0; may_write <= 0;
      cycle_no <= 0; last_poll_out_cycle <= -10; prev_was_fail_poll_out <= 0;
    end else begin
      automatic logic hit = cpu_req.addr[31:4] == 28'hffff000;
      automatic logic [3:0] ofs = cpu_req.addr[3:0];
      automatic logic [31:0] nr = 0;
      cycle_no <= cycle_no + 1;
      check(!(cpu_req.mem_read && cpu_req.mem_write), "read and write at once");
      if (cpu_req.mem_read || cpu_req.mem_write)
        check(hit && ofs[1:0] == 2'b00, $sformatf("access outside the adaptor: %h", cpu_req.addr));
      if (cpu_req.mem_write)
        check(ofs == 4'hc, "write to a register other than DataOutReg");
      // reads
      if (cpu_req.mem_read) begin
        case (ofs)
          4'h0: begin
            nr = {31'b0, cin};
            if (cin) may_read_data <= 1; else n_empty_polls++;
          end
          4'h4: begin
            check(may_read_data, "DataInReg read without a Ready poll");
            may_read_data <= 0;
            nr = {24'b0, din};
            cin <= 0;
            cin_delay <= $urandom_range(0, 60);
          end
          4'h8: begin
            nr = {31'b0, cout};
            if (cout) may_write <= 1;
            else begin
              n_full_polls++;
              if (prev_was_fail_poll_out)
                check(cycle_no - last_poll_out_cycle == 2, "ControlOutReg poll period is 2 cycles");
            end
            prev_was_fail_poll_out <= !cout;
            last_poll_out_cycle <= cycle_no;
          end
          default: nr = 0;
        endcase
      end
      cpu_rdata <= nr;
      // writes
      if (cpu_req.mem_write && ofs == 4'hc) begin
        check(may_write, "DataOutReg written without a Ready poll");
        check(cout, "DataOutReg written while busy (back pressure ignored)");
        may_write <= 0;
        cout <= 0;
        cout_delay <= $urandom_range(0, 40);
        out_got.push_back(cpu_req.wdata[7:0]);
        check(cpu_req.wdata[31:8] == 0, "upper write data bits are zero");
      end
      // device progress
      if (!cin && !(cpu_req.mem_read && ofs == 4'h4)) begin
        if (cin_delay > 0) cin_delay <= cin_delay - 1;
        else if (in_q.size() > 0) begin
          cin <= 1;
          din <= in_q.pop_front();
        end
      end
      if (!cout && !(cpu_req.mem_write)) begin
        if (cout_delay > 0) cout_delay <= cout_delay - 1;
        else cout <= 1;
      end
      if (reply_active) n_reply_cycles++;
    end
  end

  initial begin
    byte unsigned stimulus[$];
    string s;
    n_empty_polls = 0; n_full_polls = 0; n_replies = 0; n_reply_cycles = 0;
    // directed strings, then random bytes drawn mostly from the trigger characters
    s = "hellocs150xccs150cs1cs150cs15cs150!";
    for (int i = 0; i < s.len(); i++) stimulus.push_back(s[i]);
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      case (r)
        0: stimulus.push_back("c");
        1: stimulus.push_back("s");
        2: stimulus.push_back("1");
        3: stimulus.push_back("5");
        4: stimulus.push_back("0");
        5: s = "cs150";
        default: stimulus.push_back(8'($urandom));
      endcase
      if (r == 5) for (int k = 0; k < 5; k++) stimulus.push_back(s[k]);
    end
    in_q = stimulus;
    build_expected();
    for (int i = 0; i + 14 < expected.size(); i++) if (expected[i] == "D" && expected[i+14] == "\n") n_replies++;

    rst = 1;
    cpu_rdata = 0;
    repeat (3) @(posedge clk);
    check(cpu_req.mem_read == 0 || cpu_req.addr == ADAPTOR_BASE, "first access is a ControlInReg poll");
    rst = 0;
    // run until all output arrived
    while (out_got.size() < expected.size()) @(posedge clk);
    repeat (200) @(posedge clk);
    check(out_got.size() == expected.size(),
          $sformatf("output length %0d, expected %0d", out_got.size(), expected.size()));
    for (int i = 0; i < expected.size() && i < out_got.size(); i++)
      check(out_got[i] == expected[i], $sformatf("output byte %0d: %h expected %h", i, out_got[i], expected[i]));
    check(n_replies > 10, "reply message was triggered many times");
    check(n_empty_polls > 0, "emulator waited on an empty receive side");
    check(n_full_polls > 0, "emulator waited on transmit back pressure");
    check(n_reply_cycles > 0, "reply_active was seen");
    $display("in %0d bytes, out %0d bytes, replies %0d, empty polls %0d, busy polls %0d",
             stimulus.size(), out_got.size(), n_replies, n_empty_polls, n_full_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

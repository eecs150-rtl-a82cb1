// CPU emulator: a small state machine that drives the CPU's data-memory port
// exactly as a polling echo program on a MIPS CPU would, standing in for the
// processor while the UART/CPU adaptor is brought up.
//
// Program it imitates (one memory access per step, like lw/sw):
//   1. lw ControlInReg until its Ready bit (bit 0) is 1
//   2. lw DataInReg                    -> byte b (this read clears Ready)
//   3. lw ControlOutReg until Ready is 1
//   4. sw b to DataOutReg              (echo)
//   5. if the bytes received so far end in "cs150", send each character of
//      "Dusk till Dawn\n" the same way, polling ControlOutReg before every
//      write; then go back to 1.
// Step 5 produces many output bytes for one input byte, so the CPU must wait
// on the back pressure of the transmit side.
//
// Interface: cpu_req drives address, write data, MemRead, MemWrite; cpu_rdata
// is the read data, expected one cycle after the read request. Each access
// takes one request cycle, and each read one more cycle to look at the data,
// so a poll of a Ready bit repeats every 2 cycles.
// Only bits 7:0 of cpu_rdata carry information (Ready in bit 0, a byte in
// bits 7:0); the upper bits are left unused.
//
// The echo behaviour, the trigger sequence, the reply and the polling of both
// Ready bits follow the lab description. The exact instruction order of the
// echo program is not given there: echoing the byte before the reply, the
// two-cycle poll loop and the synchronous reset into step 1 are this design's
// choices. The trigger "cs150" shares no prefix with any of its suffixes, so
// on a mismatch the match restarts at 1 if the byte is 'c' and at 0 otherwise,
// which finds every occurrence.
module cpu_emulator
  import uart_cpu_pkg::*;
#(
  parameter logic [CPU_DW-1:0] BASE_ADDR = ADAPTOR_BASE
) (
  input  logic              clk,
  input  logic              rst,
  output cpu_req_t          cpu_req,
  input  logic [CPU_DW-1:0] cpu_rdata,
  // Status, for observation: the reply message is being sent
  output logic              reply_active
);

  typedef enum logic [2:0] {
    S_POLL_IN,      // issue lw ControlInReg
    S_POLL_IN_CHK,  // look at the Ready bit
    S_READ_DATA,    // issue lw DataInReg
    S_GET_DATA,     // capture the byte, update the sequence matcher
    S_POLL_OUT,     // issue lw ControlOutReg
    S_POLL_OUT_CHK, // look at the Ready bit
    S_WRITE         // issue sw DataOutReg
  } state_t;

  localparam int unsigned MATCH_W = $clog2(TRIGGER_LEN + 1);
  localparam int unsigned IDX_W   = $clog2(REPLY_LEN);

  state_t             state;
  logic [BYTE_W-1:0]  tx_byte;      // byte the next sw sends
  logic [MATCH_W-1:0] match_cnt;    // characters of TRIGGER matched so far
  logic               msg_pending;  // more reply characters follow tx_byte
  logic [IDX_W-1:0]   msg_idx;      // next reply character to load

  assign reply_active = msg_pending;

  // Memory request of the current step
  always_comb begin
    cpu_req = '0;
    unique case (state)
      S_POLL_IN: begin
        cpu_req.addr     = BASE_ADDR | CPU_DW'(OFS_CTRL_IN);
        cpu_req.mem_read = 1'b1;
      end
      S_READ_DATA: begin
        cpu_req.addr     = BASE_ADDR | CPU_DW'(OFS_DATA_IN);
        cpu_req.mem_read = 1'b1;
      end
      S_POLL_OUT: begin
        cpu_req.addr     = BASE_ADDR | CPU_DW'(OFS_CTRL_OUT);
        cpu_req.mem_read = 1'b1;
      end
      S_WRITE: begin
        cpu_req.addr      = BASE_ADDR | CPU_DW'(OFS_DATA_OUT);
        cpu_req.wdata     = {{(CPU_DW-BYTE_W){1'b0}}, tx_byte};
        cpu_req.mem_write = 1'b1;
      end
      default: ;
    endcase
  end

  // Next match count after receiving byte b
  function automatic logic [MATCH_W-1:0] next_match(input logic [MATCH_W-1:0] cnt,
                                                    input logic [BYTE_W-1:0]  b);
    if (b == trigger_char(int'(cnt)))
      return cnt + 1'b1;
    else if (b == trigger_char(0))
      return MATCH_W'(1);
    else
      return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_POLL_IN;
      tx_byte     <= '0;
      match_cnt   <= '0;
      msg_pending <= 1'b0;
      msg_idx     <= '0;
    end else begin
      unique case (state)
        S_POLL_IN:      state <= S_POLL_IN_CHK;
        S_POLL_IN_CHK:  state <= cpu_rdata[0] ? S_READ_DATA : S_POLL_IN;
        S_READ_DATA:    state <= S_GET_DATA;
        S_GET_DATA: begin
          logic [MATCH_W-1:0] m;
          m       = next_match(match_cnt, cpu_rdata[BYTE_W-1:0]);
          tx_byte <= cpu_rdata[BYTE_W-1:0];
          if (m == MATCH_W'(TRIGGER_LEN)) begin
            match_cnt   <= '0;
            msg_pending <= 1'b1;
            msg_idx     <= '0;
          end else begin
            match_cnt <= m;
          end
          state <= S_POLL_OUT;
        end
        S_POLL_OUT:     state <= S_POLL_OUT_CHK;
        S_POLL_OUT_CHK: state <= cpu_rdata[0] ? S_WRITE : S_POLL_OUT;
        S_WRITE: begin
          if (msg_pending) begin
            tx_byte <= reply_char(int'(msg_idx));
            msg_idx <= msg_idx + 1'b1;
            if (msg_idx == IDX_W'(REPLY_LEN - 1)) msg_pending <= 1'b0;
            state <= S_POLL_OUT;
          end else begin
            state <= S_POLL_IN;
          end
        end
        default:        state <= S_POLL_IN;
      endcase
    end
  end

endmodule

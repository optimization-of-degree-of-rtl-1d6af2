// host_decoder: turns 5-byte host packets from a byte-wide UART into memory-bus
// accesses, and sends read responses and interrupt packets back.
//
// Packet format (40 bits): COMMAND[39:32], ADDR[31:16], DATA[15:0]. Bytes travel
// least significant first: DATA LSB, DATA MSB, ADDR LSB, ADDR MSB, COMMAND.
//
// UART control FSM. Receive branch: WAIT_FOR_BYTE sees `rx_rdy`, STROBE pulses
// `rx_strobe` to take the byte, BYTE_CAPTURE shifts it into the 40-bit packet
// register; then in test mode the byte is dropped, else the byte counter is advanced
// (INCREMENT_BYTE_COUNT), or at the fifth byte READ_COMPLETE hands the packet to the
// command encoder/decoder, or an out-of-range count is cleared (SET_BYTE_COUNT_ZERO).
// Transmit branch: when a packet is ready and the UART reports `tx_rdy`, states
// DATA0, DATA1, ADDR0, ADDR1, COMMAND each put one byte on `tx_byte` with
// `tx_strobe`; each is followed by WAITn, which drops the strobe and then waits for
// `tx_rdy`, because the UART needs a cycle to update it. Receiving takes priority;
// the FSM never receives and transmits at the same time. `host_busyb` is low while
// the FSM or the decoder is busy, for flow control by a buffered UART.
//
// Command encoder/decoder (CED). WRITEk drives `we_n` low for one cycle with
// `bank_sel` = k, `addr` and `data_to_psd`. READk drives `re_n` low for one cycle and
// waits for the addressed bank's `rd_valid`; the response packet READk_RESP carries
// the same address and the returned data. A read nobody answers within
// READ_TIMEOUT cycles, and any other command byte, is ignored. Interrupt k
// (`int_req[k]`, a pulse) latches `int_data[k]` and queues an INTk packet whose ADDR
// field is int_data[k][31:16] and DATA field int_data[k][15:0]; a newer request
// before it is sent replaces the data. Read responses go out before interrupts, and
// lower-numbered interrupts first.
//
// The packet format, command codes, FSM states and their order follow the document.
// The rd_valid handshake, the read timeout, the placement of the two 16-bit interrupt
// words, the clearing of the byte counter in READ_COMPLETE and the busy rule are this
// design's choices.
module host_decoder
  import dlia_pkg::*;
#(
  parameter int READ_TIMEOUT = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        test_mode,
  // UART byte interface
  input  logic        rx_rdy,
  input  logic [7:0]  rx_byte,
  output logic        rx_strobe,
  input  logic        tx_rdy,
  output logic [7:0]  tx_byte,
  output logic        tx_strobe,
  output logic        host_busyb,
  // system memory bus
  output logic        we_n,
  output logic        re_n,
  output logic [15:0] addr,
  output logic [2:0]  bank_sel,
  output logic [15:0] data_to_psd,
  input  logic [15:0] data_from_psd,
  input  logic        rd_valid,
  // interrupts
  input  logic [NUM_INTS-1:0] int_req,
  input  logic [31:0]         int_data [NUM_INTS]
);

  typedef enum logic [4:0] {
    U_WAIT_FOR_BYTE, U_STROBE, U_BYTE_CAPTURE, U_SET_BYTE_COUNT_ZERO,
    U_INCREMENT_BYTE_COUNT, U_READ_COMPLETE,
    U_DATA0, U_WAIT1, U_DATA1, U_WAIT2, U_ADDR0, U_WAIT3, U_ADDR1, U_WAIT4,
    U_COMMAND, U_WAIT5
  } ustate_e;

  ustate_e     ustate;
  logic [39:0] rx_pkt;
  logic [2:0]  byte_cnt;
  packet_t     tx_pkt;
  logic        cmd_rdy;      // tx_pkt holds a packet to send
  logic        exec;         // a received packet is complete
  logic        tx_done;

  // ---------------- UART control FSM ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ustate    <= U_WAIT_FOR_BYTE;
      rx_pkt    <= '0;
      byte_cnt  <= '0;
      rx_strobe <= 1'b0;
      tx_strobe <= 1'b0;
      tx_byte   <= '0;
      exec      <= 1'b0;
      tx_done   <= 1'b0;
    end else begin
      rx_strobe <= 1'b0;
      exec      <= 1'b0;
      tx_done   <= 1'b0;
      unique case (ustate)
        U_WAIT_FOR_BYTE: begin
          if (rx_rdy)                  ustate <= U_STROBE;
          else if (cmd_rdy && !tx_done && tx_rdy) ustate <= U_DATA0;
        end
        U_STROBE: begin
          rx_strobe <= 1'b1;
          ustate    <= U_BYTE_CAPTURE;
        end
        U_BYTE_CAPTURE: begin
          rx_pkt <= {rx_byte, rx_pkt[39:8]};
          if (test_mode)            ustate <= U_WAIT_FOR_BYTE;
          else if (byte_cnt == 3'd4) ustate <= U_READ_COMPLETE;
          else if (byte_cnt < 3'd4)  ustate <= U_INCREMENT_BYTE_COUNT;
          else                       ustate <= U_SET_BYTE_COUNT_ZERO;
        end
        U_SET_BYTE_COUNT_ZERO: begin
          byte_cnt <= '0;
          ustate   <= U_WAIT_FOR_BYTE;
        end
        U_INCREMENT_BYTE_COUNT: begin
          byte_cnt <= byte_cnt + 3'd1;
          ustate   <= U_WAIT_FOR_BYTE;
        end
        U_READ_COMPLETE: begin
          byte_cnt <= '0;
          exec     <= 1'b1;
          ustate   <= U_WAIT_FOR_BYTE;
        end
        U_DATA0:   begin tx_byte <= tx_pkt.data[7:0];   tx_strobe <= 1'b1; ustate <= U_WAIT1; end
        U_DATA1:   begin tx_byte <= tx_pkt.data[15:8];  tx_strobe <= 1'b1; ustate <= U_WAIT2; end
        U_ADDR0:   begin tx_byte <= tx_pkt.addr[7:0];   tx_strobe <= 1'b1; ustate <= U_WAIT3; end
        U_ADDR1:   begin tx_byte <= tx_pkt.addr[15:8];  tx_strobe <= 1'b1; ustate <= U_WAIT4; end
        U_COMMAND: begin tx_byte <= tx_pkt.cmd;         tx_strobe <= 1'b1; ustate <= U_WAIT5; end
        U_WAIT1, U_WAIT2, U_WAIT3, U_WAIT4, U_WAIT5: begin
          if (tx_strobe) begin
            tx_strobe <= 1'b0;
          end else if (tx_rdy) begin
            unique case (ustate)
              U_WAIT1: ustate <= U_DATA1;
              U_WAIT2: ustate <= U_ADDR0;
              U_WAIT3: ustate <= U_ADDR1;
              U_WAIT4: ustate <= U_COMMAND;
              default: begin
                ustate  <= U_WAIT_FOR_BYTE;
                tx_done <= 1'b1;
              end
            endcase
          end
        end
        default: ustate <= U_WAIT_FOR_BYTE;
      endcase
    end
  end

  // ---------------- command encoder / decoder ----------------
  packet_t                 pkt;
  logic                    rd_wait;
  logic [$clog2(READ_TIMEOUT+1)-1:0] rd_timer;
  logic [7:0]              rd_resp_cmd;
  logic                    resp_pend;
  packet_t                 resp_pkt;
  logic [NUM_INTS-1:0]     int_pend;
  logic [31:0]             int_hold [NUM_INTS];
  logic                    int_any;
  logic [2:0]              int_sel;

  assign pkt = packet_t'(rx_pkt);

  always_comb begin
    int_any = |int_pend;
    int_sel = '0;
    for (int k = NUM_INTS - 1; k >= 0; k--)
      if (int_pend[k]) int_sel = 3'(k);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we_n        <= 1'b1;
      re_n        <= 1'b1;
      addr        <= '0;
      bank_sel    <= '0;
      data_to_psd <= '0;
      rd_wait     <= 1'b0;
      rd_timer    <= '0;
      rd_resp_cmd <= '0;
      resp_pend   <= 1'b0;
      resp_pkt    <= '0;
      tx_pkt      <= '0;
      cmd_rdy     <= 1'b0;
      int_pend    <= '0;
      for (int k = 0; k < NUM_INTS; k++) int_hold[k] <= '0;
    end else begin
      we_n <= 1'b1;
      re_n <= 1'b1;

      // execute a received packet
      if (exec && !rd_wait && !resp_pend) begin
        addr        <= pkt.addr;
        data_to_psd <= pkt.data;
        if (pkt.cmd >= CMD_WRITE0 && pkt.cmd <= CMD_READ4_RESP) begin
          bank_sel <= 3'((pkt.cmd - 8'd1) / 8'd3);
          unique case ((pkt.cmd - 8'd1) % 8'd3)
            8'd0: we_n <= 1'b0;
            8'd1: begin
              re_n        <= 1'b0;
              rd_wait     <= 1'b1;
              rd_timer    <= '0;
              rd_resp_cmd <= pkt.cmd + 8'd1;
            end
            default: ;   // a response code sent by the host: ignored
          endcase
        end
      end

      // collect read data
      if (rd_wait) begin
        if (rd_valid) begin
          rd_wait   <= 1'b0;
          resp_pend <= 1'b1;
          resp_pkt  <= '{cmd: rd_resp_cmd, addr: addr, data: data_from_psd};
        end else if (int'(rd_timer) == READ_TIMEOUT) begin
          rd_wait <= 1'b0;
        end else begin
          rd_timer <= rd_timer + 1'b1;
        end
      end

      // interrupts
      for (int k = 0; k < NUM_INTS; k++)
        if (int_req[k]) begin
          int_pend[k] <= 1'b1;
          int_hold[k] <= int_data[k];
        end

      // load the transmit packet
      if (tx_done) begin
        cmd_rdy <= 1'b0;
      end else if (!cmd_rdy) begin
        if (resp_pend) begin
          tx_pkt    <= resp_pkt;
          cmd_rdy   <= 1'b1;
          resp_pend <= 1'b0;
        end else if (int_any && !rd_wait) begin
          tx_pkt  <= '{cmd: CMD_INT0 + 8'(int_sel), addr: int_hold[int_sel][31:16],
                       data: int_hold[int_sel][15:0]};
          cmd_rdy <= 1'b1;
          if (!int_req[int_sel]) int_pend[int_sel] <= 1'b0;
        end
      end
    end
  end

  assign host_busyb = (ustate == U_WAIT_FOR_BYTE) && !rd_wait && !resp_pend;

  // A packet completes only when no earlier read is outstanding.
  a_exec_idle: assert property (@(posedge clk) disable iff (rst) exec |-> !rd_wait && !resp_pend)
    else $error("host_decoder: packet received while a read is outstanding");

endmodule

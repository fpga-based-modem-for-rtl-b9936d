// Buffer controller: the handshakes between the RS-232 modules and the two
// 10K-bit storage buffers, as an eleven-state machine.
//
//  S0 RX_RESET  hold the RS-232 receiver in reset (LED0)
//  S1 RX_ARM    release it
//  S2 RX_WAIT   wait for a received character (receiver `rdy`)
//  S3 RX_STORE  hand the character to the receive buffer; when stored go to
//               S5 if the buffer is now full, else S4
//  S4 RX_ACK    finish the write handshake, back to S0 for the next one
//  S5 DISPENSE  start the receive buffer streaming its 10,000 bits into the
//               loopback; go to S6 when it has finished
//  S6 LOOPBACK  wait for the transmit buffer to hold 10,000 bits (LED1)
//  S7 TX_IDLE   wait until the RS-232 transmitter is free (LED2 for S7-S10)
//  S8 TX_FETCH  ask the transmit buffer for a character; back to S0 when the
//               buffer is empty, to S9 when a character is ready
//  S9 TX_TAKE   acknowledge it to the transmit buffer
//  S10 TX_SEND  start the transmitter and wait until it reports busy; to S7
// LED3 is lit while either RS-232 module is working. The state list and
// transitions are the design's; the exact handshake signals are this
// implementation's.
module buffer_control (
  input  logic       clk,
  input  logic       rst,
  // RS-232 receiver
  output logic       rx_rst,
  input  logic       rx_rdy,
  input  logic [7:0] rx_data,
  input  logic       rx_busy,
  // receive buffer
  output logic       rb_wr,
  output logic [7:0] rb_data,
  input  logic       rb_wr_done,
  input  logic       rb_full,
  output logic       rb_start,
  input  logic       rb_done,
  // transmit buffer
  input  logic       tb_full,
  output logic       tb_rd_req,
  input  logic       tb_char_rdy,
  input  logic [7:0] tb_data,
  output logic       tb_rd_ack,
  input  logic       tb_empty,
  // RS-232 transmitter
  output logic       tx_start,
  output logic [7:0] tx_data,
  input  logic       tx_busy,
  // status
  output logic [3:0] led,
  output modem_pkg::bc_state_t state_o
);
  import modem_pkg::*;

  bc_state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= BC_RX_RESET;
      rb_data <= '0;
      tx_data <= '0;
    end else begin
      unique case (state)
        BC_RX_RESET: state <= BC_RX_ARM;
        BC_RX_ARM:   state <= BC_RX_WAIT;
        BC_RX_WAIT:  if (rx_rdy) begin
                       rb_data <= rx_data;
                       state   <= BC_RX_STORE;
                     end
        BC_RX_STORE: if (rb_wr_done) state <= rb_full ? BC_DISPENSE : BC_RX_ACK;
        BC_RX_ACK:   if (!rb_wr_done) state <= BC_RX_RESET;
        BC_DISPENSE: if (rb_done) state <= BC_LOOPBACK;
        BC_LOOPBACK: if (tb_full) state <= BC_TX_IDLE;
        BC_TX_IDLE:  if (!tx_busy) state <= BC_TX_FETCH;
        BC_TX_FETCH: if (tb_empty) state <= BC_RX_RESET;
                     else if (tb_char_rdy) begin
                       tx_data <= tb_data;
                       state   <= BC_TX_TAKE;
                     end
        BC_TX_TAKE:  state <= BC_TX_SEND;
        BC_TX_SEND:  if (tx_busy) state <= BC_TX_IDLE;
        default:     state <= BC_RX_RESET;
      endcase
    end
  end

  always_comb begin
    rx_rst    = (state == BC_RX_RESET);
    rb_wr     = (state == BC_RX_STORE);
    rb_start  = (state == BC_DISPENSE);
    tb_rd_req = (state == BC_TX_FETCH);
    tb_rd_ack = (state == BC_TX_TAKE);
    tx_start  = (state == BC_TX_SEND) && !tx_busy;
    led[0]    = (state <= BC_DISPENSE);
    led[1]    = (state == BC_LOOPBACK);
    led[2]    = (state >= BC_TX_IDLE);
    led[3]    = rx_busy | tx_busy;
  end

  assign state_o = state;
endmodule

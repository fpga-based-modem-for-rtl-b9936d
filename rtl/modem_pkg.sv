// Shared constants and types of the 1200 b/s BPSK satellite modem.
//
// The modem runs from one 100 MHz clock. Every signal-processing block works
// at a 2 MHz sample rate, marked by a one-clock sample strobe; the bit rate
// on the RF side and on the RS-232 side is 1200 b/s. The helpers below turn
// a frequency into a 32-bit phase increment, 2^32 * f / f_sample, and build
// the sine tables of the synthesizers.
package modem_pkg;

  // 32-bit phase increment for a frequency f at the sample rate.
  function automatic logic [31:0] phase_inc(input longint unsigned f, input longint unsigned fs);
    return 32'(((f << 32) + fs / 2) / fs);
  endfunction

  // Signed sine table entry: round(sin(2*pi*i/2^aw) * (2^(ow-1)-1)).
  function automatic int sine_entry(input int i, input int aw, input int ow);
    return $rtoi($floor($sin(6.283185307179586 * real'(i) / (2.0 ** aw))
                        * (2.0 ** (ow - 1) - 1.0) + 0.5));
  endfunction

  // States of the buffer controller. S0..S5 serve the receive side, S6 waits
  // for the loopback, S7..S10 serve the transmit side.
  // Coefficient n of a TAPS-tap low-pass FIR with cut-off fc_hz at fs_hz:
  // Hamming-windowed sinc, (0.54 - 0.46 cos(2 pi n/(TAPS-1))) *
  // sin(2 pi fc m)/(pi m) with m = n - (TAPS-1)/2 and fc = fc_hz/fs_hz,
  // scaled so that the centre tap (value 2 fc) becomes 4095.
  function automatic int fir_coef(input int n, input int taps, input int fc_hz, input int fs_hz);
    return (n == (taps - 1) / 2) ? 4095 :
      $rtoi(4095.0 * (0.54 - 0.46 * $cos(6.283185307179586 * real'(n) / real'(taps - 1)))
            * $sin(6.283185307179586 * real'(fc_hz) / real'(fs_hz) * real'(n - (taps - 1) / 2))
            / (3.141592653589793 * real'(n - (taps - 1) / 2))
            / (2.0 * real'(fc_hz) / real'(fs_hz)) + 0.5);
  endfunction

  typedef enum logic [3:0] {
    BC_RX_RESET   = 4'd0,   // hold the RS-232 receiver in reset
    BC_RX_ARM     = 4'd1,   // release the receiver
    BC_RX_WAIT    = 4'd2,   // wait for a character
    BC_RX_STORE   = 4'd3,   // write it to the receive buffer
    BC_RX_ACK     = 4'd4,   // handshake with the receiver
    BC_DISPENSE   = 4'd5,   // receive buffer full: send it into the loopback
    BC_LOOPBACK   = 4'd6,   // wait for the transmit buffer to fill
    BC_TX_IDLE    = 4'd7,   // wait for the RS-232 transmitter to be free
    BC_TX_FETCH   = 4'd8,   // ask the transmit buffer for a character
    BC_TX_TAKE    = 4'd9,   // handshake with the transmit buffer
    BC_TX_SEND    = 4'd10   // handshake with the RS-232 transmitter
  } bc_state_t;

endpackage

// 10K-bit transmit storage buffer with transmit delay.
//
// On `alert` (the receive buffer has started to send its block into the
// loopback) it waits DELAY_BITS recovered bits - the loopback's latency - and
// then stores the next NBITS recovered bits, LSB of each character first.
// `full` rises when all are stored. The buffer controller then reads the
// characters back: `rd_req` asks for the next one, `char_rdy` (one clock
// later, while `rd_req` is held) presents it on `rdata`, and `rd_ack` moves
// on to the next. `empty` is high when every character has been read. The
// delay is counted in recovered bit periods; its default (1) is the measured
// latency of this loopback.
module tx_buffer #(
  parameter int unsigned NBITS      = 10_000,
  parameter int unsigned DELAY_BITS = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       alert,
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic       full,
  input  logic       rd_req,
  output logic       char_rdy,
  output logic [7:0] rdata,
  input  logic       rd_ack,
  output logic       empty
);
  localparam int unsigned NCHARS = NBITS / 8;
  localparam int unsigned AW     = $clog2(NCHARS + 1);
  localparam int unsigned DW     = $clog2(DELAY_BITS + 2);

  typedef enum logic [1:0] {TB_IDLE, TB_DELAY, TB_FILL, TB_READ} tb_state_t;

  tb_state_t     state;
  logic [7:0]    mem [NCHARS];
  logic [AW-1:0] wptr, rptr;
  logic [2:0]    bidx;
  logic [7:0]    shreg;
  logic [DW-1:0] dcnt;
  logic          wr_en;

  assign full  = (state == TB_READ);
  assign empty = (state == TB_READ) && (rptr == AW'(NCHARS));
  assign wr_en = (state == TB_FILL) && bit_valid && (bidx == 3'd7);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= {bit_in, shreg[7:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= TB_IDLE;
      wptr     <= '0;
      rptr     <= '0;
      bidx     <= '0;
      shreg    <= '0;
      dcnt     <= '0;
      char_rdy <= 1'b0;
      rdata    <= '0;
    end else begin
      if (alert) begin
        state <= (DELAY_BITS == 0) ? TB_FILL : TB_DELAY;
        dcnt  <= '0;
        wptr  <= '0;
        rptr  <= '0;
        bidx  <= '0;
      end else begin
        unique case (state)
          TB_IDLE: ;
          TB_DELAY: if (bit_valid) begin
            dcnt <= dcnt + 1'b1;
            if (dcnt == DW'(DELAY_BITS - 1)) state <= TB_FILL;
          end
          TB_FILL: if (bit_valid) begin
            shreg <= {bit_in, shreg[7:1]};
            bidx  <= bidx + 1'b1;
            if (bidx == 3'd7) begin
              wptr <= wptr + 1'b1;
              if (wptr == AW'(NCHARS - 1)) state <= TB_READ;
            end
          end
          TB_READ: begin
            if (rd_ack && char_rdy) begin
              char_rdy <= 1'b0;
              rptr     <= rptr + 1'b1;
            end else if (rd_req && !char_rdy && rptr != AW'(NCHARS)) begin
              rdata    <= mem[rptr];
              char_rdy <= 1'b1;
            end
          end
          default: state <= TB_IDLE;
        endcase
      end
    end
  end
endmodule

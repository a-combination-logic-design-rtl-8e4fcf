// rx_fifo: the one-byte receive FIFO.
//
// Serial bits from the baseband (`bit_valid`/`rx_bit`, LSB of each byte
// first) are shifted in; every eighth bit the byte is moved to `rx_byte`
// and `byte_valid` pulses for one cycle. One byte is enough because a
// byte takes at least eight clocks to arrive while the SRAM can take it
// in two. `sync` (start of a received frame) realigns the bit counter; a
// bit arriving in the same cycle is kept as the first of the frame.
// If `byte_valid` fires again before `pop` took the previous byte, the
// sticky `overflow` flag is set until `sync`.
module rx_fifo (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  logic       bit_valid,
  input  logic       rx_bit,
  input  logic       pop,
  output logic [7:0] rx_byte,
  output logic       byte_valid,
  output logic       full,
  output logic       overflow
);
  logic [7:0] sr;
  logic [2:0] nb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; nb <= '0; rx_byte <= '0;
      byte_valid <= 1'b0; full <= 1'b0; overflow <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (pop) full <= 1'b0;
      if (sync) begin
        nb <= '0; full <= 1'b0; overflow <= 1'b0;
      end
      // a bit in the same cycle as `sync` is the first of the new frame
      if (bit_valid) begin
        sr <= {rx_bit, sr[7:1]};
        nb <= sync ? 3'd1 : nb + 3'd1;
        if (nb == 3'd7 && !sync) begin
          rx_byte    <= {rx_bit, sr[7:1]};
          byte_valid <= 1'b1;
          full       <= 1'b1;
          if (full && !pop) overflow <= 1'b1;
        end
      end
    end
  end
endmodule

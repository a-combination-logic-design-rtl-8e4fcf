// tx_fifo: the transmit FIFO of the revised controller, one 32-bit register.
//
// The TxFSM pushes whole bytes (`push`/`din`, accepted while `space` is
// high, i.e. at least 8 free bits; `free` counts the whole free bytes so
// that the TxFSM can issue SRAM reads ahead for exactly that many); the baseband takes one bit per
// `bit_en` strobe from `tx_bit`, each byte least significant bit first
// as the 802.11 PHYs send it. `has_bit` says a bit is waiting. A strobe
// with no bit waiting sets the sticky `underrun` flag until `clear`.
// Holding four bytes lets the SRAM reads keep ahead of the serial port
// without the large FIFO of the first version.
module tx_fifo (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       push,
  input  logic [7:0] din,
  output logic       space,
  output logic [2:0] free,
  input  logic       bit_en,
  output logic       tx_bit,
  output logic       has_bit,
  output logic       empty,
  output logic       underrun
);
  logic [31:0] data;
  logic [5:0]  nbits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data     <= '0;
      nbits    <= '0;
      underrun <= 1'b0;
    end else if (clear) begin
      data     <= '0;
      nbits    <= '0;
      underrun <= 1'b0;
    end else begin
      logic [31:0] d;
      logic [5:0]  n;
      logic        shift;
      shift = bit_en && (nbits != '0);
      d = shift ? (data >> 1) : data;
      n = shift ? nbits - 6'd1 : nbits;
      if (push && space) begin
        d = d | (32'(din) << n);
        n = n + 6'd8;
      end
      data  <= d;
      nbits <= n;
      if (bit_en && nbits == '0) underrun <= 1'b1;
    end
  end

  assign space   = (nbits <= 6'd24);
  assign free    = 3'((6'd32 - nbits) >> 3);   // whole free bytes, 0-4
  assign tx_bit  = data[0];
  assign has_bit = (nbits != '0);
  assign empty   = (nbits == '0);
endmodule

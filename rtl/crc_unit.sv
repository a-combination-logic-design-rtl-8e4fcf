// crc_unit: byte-parallel CRC generator and checker.
//
// One instance with the defaults is the CRC-32 frame check sequence of
// IEEE 802.11 (polynomial 04C11DB7, bits taken LSB first, preset to all
// ones, sent complemented); another with W=16, POLY=16'h8408 is the
// CRC-16 (x^16+x^12+x^5+1) that protects the PLCP header. Eight bits are
// folded in per `en` cycle, so a whole byte of the data stream is
// handled at once - the parallel-CRC idea used for the MII, applied to
// bytes here. `init` presets the register. `fcs` is the complemented
// value to transmit (LSB byte first). `check_ok` is high when the
// register holds the fixed residue that a stream ending in its own
// correct check sequence leaves behind.
module crc_unit #(
  parameter int unsigned W       = 32,
  parameter logic [W-1:0] POLY    = 32'hEDB88320,  // reflected polynomial
  parameter logic [W-1:0] RESIDUE = 32'hDEBB20E3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [7:0]   din,
  output logic [W-1:0] crc,
  output logic [W-1:0] fcs,
  output logic         check_ok
);
  function automatic logic [W-1:0] step8(input logic [W-1:0] c, input logic [7:0] d);
    logic [W-1:0] r;
    r = c;
    for (int i = 0; i < 8; i++)
      r = (r[0] ^ d[i]) ? ((r >> 1) ^ POLY) : (r >> 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= step8(crc, din);
  end

  assign fcs      = ~crc;
  assign check_ok = (crc == RESIDUE);
endmodule

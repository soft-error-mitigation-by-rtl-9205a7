// crc32_sig -- verification signature generator.
//
// Hashes instruction results, as they complete, into a CRC-32 signature. The
// master and the slave each own one; at the end of a p-XACT the two values are
// compared (consolidation). That the signature is a CRC-32 of instruction
// results is from the design description; the exact CRC variant is this
// implementation's choice: the reflected IEEE 802.3 polynomial (0xEDB88320),
// initial value 0xFFFFFFFF, no final inversion, bits taken LSB first. The
// whole DATA_W-bit result is folded in one cycle (an unrolled bit-serial
// update).
//
// Interface: `clear` restarts the signature; `valid`/`data` add one result.
// If both are high in the same cycle the result is the first one of the new
// signature. `sig` is registered and shows every result up to the previous
// cycle; `sig_next` is the combinational value after this cycle's update.
module crc32_sig #(
  parameter int unsigned DATA_W = lbra_pkg::RES_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [DATA_W-1:0] data,
  output logic [31:0]       sig,
  output logic [31:0]       sig_next
);
  localparam logic [31:0] POLY = 32'hEDB8_8320;
  localparam logic [31:0] INIT = 32'hFFFF_FFFF;

  function automatic logic [31:0] fold(logic [31:0] c, logic [DATA_W-1:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < DATA_W; i++) begin
      if (r[0] ^ d[i]) r = (r >> 1) ^ POLY;
      else             r = r >> 1;
    end
    return r;
  endfunction

  always_comb begin
    logic [31:0] base;
    base = clear ? INIT : sig;
    sig_next = valid ? fold(base, data) : base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sig <= INIT;
    else        sig <= sig_next;
  end
endmodule

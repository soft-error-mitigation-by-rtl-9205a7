// dbs_signature -- read or write signature of one p-XACT.
//
// A Bloom filter over cache-block addresses in the double-bit-select (DBS)
// style: every inserted block sets two bits of a SIG_BITS-bit vector, one
// indexed by the low log2(SIG_BITS) bits of the block address and one by the
// next log2(SIG_BITS) bits. A test reports a (possibly false-positive) hit
// when both bits of the tested block are set. The description names the DBS
// scheme and the sizes (64 to 2048 bits, 1024-2048 recommended); the split
// of the address into the two index fields is this implementation's choice.
//
// Interface: `clear` empties the signature (takes priority over `insert`),
// `insert`/`ins_addr` adds a byte address, `test_addr`/`hit` is a
// combinational membership test on the registered contents.
module dbs_signature #(
  parameter int unsigned SIG_BITS = lbra_pkg::SIG_BITS,
  parameter int unsigned ADDR_W   = lbra_pkg::ADDR_W,
  parameter int unsigned BLK_OFF  = $clog2(lbra_pkg::LINE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              insert,
  input  logic [ADDR_W-1:0] ins_addr,
  input  logic [ADDR_W-1:0] test_addr,
  output logic              hit
);
  localparam int unsigned IW = $clog2(SIG_BITS);

  logic [SIG_BITS-1:0] bits;

  function automatic logic [IW-1:0] idx0(logic [ADDR_W-1:0] a);
    return a[BLK_OFF +: IW];
  endfunction
  function automatic logic [IW-1:0] idx1(logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] s;
    s = a >> (BLK_OFF + IW);
    return s[IW-1:0];
  endfunction

  assign hit   = bits[idx0(test_addr)] && bits[idx1(test_addr)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (clear) bits <= '0;
    else if (insert) begin
      bits[idx0(ins_addr)] <= 1'b1;
      bits[idx1(ins_addr)] <= 1'b1;
    end
  end
endmodule

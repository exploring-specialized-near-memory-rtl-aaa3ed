// hash_unit: bucket address computation at the memory interface.
//
// For a hash-table lookup the key is hashed to a bucket index and turned into
// the physical address of the bucket's head pointer: bucket_addr =
// table_base + 8 * index. The index is the top log2_buckets bits of the
// 64-bit product key * 0x9E3779B97F4A7C15 (multiplicative "Fibonacci"
// hashing); log2_buckets = 0 gives a single bucket. The accelerator
// controller then sends the lookup to the vault that holds that address.
// Combinational. That a hash unit computes the bucket at the memory interface
// follows the architecture; the hash function and the 8-byte bucket entry are
// this design's choices.
module hash_unit
  import nmp_pkg::*;
(
  input  logic [KEY_W-1:0] key,
  input  addr_t            table_base,
  input  logic [5:0]       log2_buckets,
  output logic [31:0]      index,
  output addr_t            bucket_addr
);
  localparam logic [63:0] GOLDEN = 64'h9E3779B97F4A7C15;
  logic [63:0] prod;

  always_comb begin
    prod = key * GOLDEN;
    if (log2_buckets == 6'd0) index = '0;
    else                      index = 32'(prod >> (7'd64 - 7'(log2_buckets)));
    bucket_addr = table_base + (index << 3);
  end
endmodule

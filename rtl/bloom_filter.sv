// bloom_filter: per-bucket Bloom filter test of the hash table engine.
//
// Every bucket's metadata carries a 32-bit Bloom filter next to its list head
// pointer. A fingerprint sets three bits, chosen by three 5-bit hashes taken
// from 15 fingerprint bits (bits BLOOM_LO .. BLOOM_LO+14, above the bucket
// index bits). The fingerprint may be in the bucket only if all three bits
// are set; otherwise it is certainly absent and a new page can be inserted
// without walking the list. Combinational. The paper gives the sizes (32-bit
// filter, three 5-bit hashes from 15 bits); which 15 bits are used is this
// design's choice.
module bloom_filter
  import sd_pkg::*;
(
  input  logic [FP_W-1:0] fp,
  input  logic [31:0]     filter,
  output logic [31:0]     bits,        // the fingerprint's three bits
  output logic            maybe,       // all three set: may be present
  output logic [31:0]     inserted     // filter with the fingerprint added
);
  assign bits     = bloom_bits(fp);
  assign maybe    = ((filter & bits) == bits);
  assign inserted = filter | bits;
endmodule

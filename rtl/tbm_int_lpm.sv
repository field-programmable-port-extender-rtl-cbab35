// tbm_int_lpm: longest matching prefix inside one Tree Bitmap node.
//
// The internal bitmap of a 4-bit-stride node has 15 bits, one per prefix of length
// 0..3 stored inside the node, in level order as the document prints it:
// position 0 is the empty prefix '*', 1-2 the 1-bit prefixes 0* and 1*, 3-6 the 2-bit
// prefixes, 7-14 the 3-bit prefixes. Position p of a prefix of length l and value v is
// p = 2^l - 1 + v; bit 14 of int_bm is position 0, so the bitmap reads left to right.
// The longest set position on the path given by the first three stride bits is the match. Its
// result index (the entry in the node's next-hop array) is the number of ones to the
// left of that position, as for the child array; this indexing is the usual Tree
// Bitmap scheme and is assumed here, the document saying only that the next hop is
// kept in a separate table.
//
// Purely combinational.
module tbm_int_lpm (
  input  logic [14:0] int_bm,     // internal bitmap, bit 14 = position 0 ('*')
  input  logic [2:0]  bits,       // first 3 address bits of this level's stride
  output logic        match,
  output logic [1:0]  match_len,  // length of the matched prefix inside the node
  output logic [3:0]  res_idx     // index into the node's next-hop array
);
  logic [3:0] pos;

  always_comb begin
    match     = 1'b0;
    match_len = 2'd0;
    pos       = 4'd0;
    // Search from the longest prefix down; the first set bit wins.
    for (int l = 3; l >= 0; l--) begin
      automatic int p = (1 << l) - 1 + int'({29'd0, bits} >> (3 - l));
      if (!match && int_bm[14 - p]) begin
        match     = 1'b1;
        match_len = 2'(l);
        pos       = 4'(p);
      end
    end
    res_idx = 4'($countones(int_bm & ~(15'h7FFF >> pos)));
  end
endmodule

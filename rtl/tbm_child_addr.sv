// tbm_child_addr: next-node address of the Tree Bitmap lookup.
//
// A trie node's first memory word holds the 16-bit extending-paths (external) bitmap
// and the 16-bit pointer to the node's array of children. With a 4-bit stride the
// stride value s selects bit s of the bitmap, counted from the left (bit 15 is s=0).
// If that bit is set a child exists; its index in the child array is the number of
// ones to the left of position s. The index is added to the 16-bit child pointer and
// the sum is shifted left by 2 to give the 18-bit word address of the child node
// (nodes are aligned to 4 words). All of this is from the document; the 4-word node
// alignment follows from its 16-bit pointer and 18-bit address.
//
// Purely combinational: ext_bm, child_ptr, stride in; has_child, child_addr out.
module tbm_child_addr (
  input  logic [15:0] ext_bm,      // extending-paths bitmap, bit 15 = stride value 0
  input  logic [15:0] child_ptr,   // child array pointer, in units of 4 words
  input  logic [3:0]  stride,      // 4 address bits of this level
  output logic        has_child,
  output logic [4:0]  ones_left,   // ones in ext_bm to the left of the stride position
  output logic [17:0] child_addr   // word address of the child node
);
  logic [15:0] mask;
  logic [15:0] sum;

  always_comb begin
    // Bits strictly left of position 'stride': the top 'stride' bits.
    mask      = ~(16'hFFFF >> stride);
    ones_left = 5'($countones(ext_bm & mask));
    has_child = ext_bm[4'd15 - stride];
    sum       = child_ptr + 16'(ones_left);
    child_addr = {sum, 2'b00};
  end
endmodule

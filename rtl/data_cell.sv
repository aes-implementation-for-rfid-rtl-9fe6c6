// data_cell: one byte of the AES State.
//
// A cell has the three functions of the design's Data Cell: load its
// horizontal input (the right-hand neighbour, used for loading the input
// block and for MixColumn), load its vertical input (the cell above, used
// for SubByte/ShiftRow), or add (XOR) its round-key byte to the byte it
// holds (AddRoundKey). With no function selected it holds its value.
// The priority between the selects is this design's choice; the controller
// never asserts more than one of them.
//
// Timing: the register updates on the rising clock edge; q is registered.
// The State is always loaded before it is read, so the cell has no reset.
module data_cell
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  shf_h,     // load horizontal input
  input  logic  shf_v,     // load vertical input
  input  logic  add_k,     // q <= q ^ key
  input  byte_t h_in,
  input  byte_t v_in,
  input  byte_t key,
  output byte_t q
);

  always_ff @(posedge clk) begin
    if (shf_h)      q <= h_in;
    else if (shf_v) q <= v_in;
    else if (add_k) q <= q ^ key;
  end

endmodule

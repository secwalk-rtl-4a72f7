// link_xor: byte-granular xor link of load and store data.
//
// The store path scrambles each byte of the write data with the key of its
// byte lane before it goes to the data cache; the load path removes the same
// scrambling from read data. Only a load from the very address (and hence the
// very keys) the data was stored with returns the original bytes; any other
// address garbles them, which the software-side data encoding then detects.
// With en_linking_i low both paths pass data through unchanged (accesses
// that are not protected). Lane j is bits [8j+7:8j] (little-endian bytes).
// The xor link follows SecWalk; the enable input follows the en_linking
// signal of its load-store unit. Purely combinational.
module link_xor (
  input  logic        en_linking_i,
  input  logic [63:0] key_i,          // from ptr_reduce
  input  logic [63:0] store_data_i,
  output logic [63:0] store_data_o,   // to memory
  input  logic [63:0] load_data_i,    // from memory
  output logic [63:0] load_data_o
);
  logic [63:0] mask;
  assign mask         = en_linking_i ? key_i : 64'd0;
  assign store_data_o = store_data_i ^ mask;
  assign load_data_o  = load_data_i ^ mask;
endmodule

// bch_shift_reg: code word shift register.
//
// A W-bit register with parallel load and a one-bit shift towards the most
// significant end. On a rising clock edge with load high it takes
// load_data; otherwise, with shift high, it moves every bit up by one
// place, drops the top bit and takes serial_in as the new bit 0. The top bit
// is presented on serial_out, so a word loaded in parallel leaves MSB first,
// and a word shifted in W times arrives in parallel on q with its first bit
// at the top. Active-low synchronous reset clears the register.
//
// The document names a shift register between the encoder and the parity
// check equations; its width, direction, load/shift controls and reset are
// this design's own choices.
module bch_shift_reg #(
  parameter int unsigned W = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_data,
  input  logic         shift,
  input  logic         serial_in,
  output logic         serial_out,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_data;
    else if (shift) q <= {q[W-2:0], serial_in};
  end

  assign serial_out = q[W-1];

endmodule

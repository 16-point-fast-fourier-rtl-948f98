// sipo: serial-in parallel-out input register. Each enabled clock shifts one
// DATA_W-bit word in at the top of a DEPTH-word register and moves the rest
// down one slot, so after DEPTH shifts the first word is in po[DATA_W-1:0]
// (slot 0) and the last in the top slot. Sizes 64 x 16 = 1024 bits follow the
// document's input register (si[63:0], po[1023:0]).
//
// The document clocks this register from a gated clock (clk AND enable); here
// the same behaviour comes from a clock enable, en. rst is an asynchronous,
// active-high clear (this design's choice). po changes one clock after en.
module sipo #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DEPTH  = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic [DATA_W-1:0]         si,
  output logic [DATA_W*DEPTH-1:0]   po
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     po <= '0;
    else if (en) po <= {si, po[DATA_W*DEPTH-1:DATA_W]};
  end

endmodule

// piso: parallel-in serial-out output register. On load it captures
// DEPTH words from pi; on each later enabled clock it moves the lowest word
// into the output register so and shifts the rest down, filling with zeros
// from the top. Words therefore leave in slot order 0, 1, ..., DEPTH-1.
// As in the document's output register, so is itself a register that is not
// updated while load is high, and the store is 64 x 16 = 1024 bits.
//
// Timing: load in cycle t; so shows word 0 after the first enabled edge
// following t, word 1 after the next, and so on. The document gates the
// clock instead of using en; rst (asynchronous, active high) is this design's
// addition.
module piso #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DEPTH  = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      load,
  input  logic                      en,
  input  logic [DATA_W*DEPTH-1:0]   pi,
  output logic [DATA_W-1:0]         so
);

  logic [DATA_W*DEPTH-1:0] tmp;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tmp <= '0;
      so  <= '0;
    end else if (load) begin
      tmp <= pi;
    end else if (en) begin
      tmp <= {{DATA_W{1'b0}}, tmp[DATA_W*DEPTH-1:DATA_W]};
      so  <= tmp[DATA_W-1:0];
    end
  end

endmodule

// delay_buffer: DEPTH-stage shift register of WIDTH-bit words.
//
// Every clock with en high the input word enters stage 0 and each stage
// passes its word on, so q is the word accepted DEPTH enabled clocks ago:
// Z(t-5) for the default depth of five bytes (one cell header). Clocks with
// en low leave the buffer unchanged. Asynchronous active-low reset clears all
// stages to zero, which is what the syndrome unit needs so that its two
// remainder machines start consistent; there is no other clear.
// The five-stage structure is the published one; the enable and the reset
// are this design's choices.
module delay_buffer #(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule

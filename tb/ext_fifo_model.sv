// ext_fifo_model: behavioural model of the board's asynchronous 9-bit FIFO
// chip, for simulation only.
//
// A byte on d is written on the rising edge of the active-low write strobe
// write_l; the oldest byte is shown on q at all times and is removed on the
// rising edge of the active-low read strobe read_l. reset_l low empties the
// FIFO and blocks writes. empty_l, half_l and full_l are the usual active-low
// flags. DEPTH defaults to 512 words, a common size for such parts.
module ext_fifo_model #(
  parameter int DEPTH = 512
) (
  input  logic       reset_l,
  input  logic       write_l,
  input  logic       read_l,
  input  logic [8:0] d,
  output logic [8:0] q,
  output logic       empty_l,
  output logic       half_l,
  output logic       full_l
);

  logic [8:0] mem[DEPTH];
  int         wp = 0;
  int         rp = 0;
  int         level;

  assign level   = wp - rp;
  assign q       = mem[rp % DEPTH];
  assign empty_l = (level != 0);
  assign half_l  = (level <= DEPTH / 2);
  assign full_l  = (level < DEPTH);

  always @(posedge write_l or negedge reset_l) begin
    if (!reset_l) wp <= 0;
    else if (level < DEPTH) begin
      mem[wp % DEPTH] <= d;
      wp <= wp + 1;
    end
  end

  always @(posedge read_l or negedge reset_l) begin
    if (!reset_l) rp <= 0;
    else if (level != 0) rp <= rp + 1;
  end

endmodule

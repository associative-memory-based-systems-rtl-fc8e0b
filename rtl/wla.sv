// wla: behavioural model of the winner line-up amplifier (an analog
// circuit; this model is synthesizable integer arithmetic standing in for
// it).
//
// Each row's signal-regulation unit receives the row's word-comparator
// signal C_i.  The common feedback F follows the smallest C_i (on chip a
// fast minimum circuit drives the shared feedback line), so the
// maximum-gain region of the distance amplifier always sits on the winner
// row, whatever its absolute distance to the input.  Rows are then placed
// on a steep characteristic below it:
//     LA_i = LA_MAX - min(LA_MAX, GAIN * (C_i - F)),  LA_MAX = 2^LAW - 1.
// The winner row reads LA_MAX; a loser one distance step away reads
// LA_MAX - GAIN; far losers saturate at 0.  With en low every LA_i is 0 and
// no row is selected.  The gain of 20 is the low end of the 20-50 range
// reported for the circuit; the voltage scale (LAW) is this model's own.
// Combinational.
module wla #(
  parameter int unsigned R     = 64,
  parameter int unsigned DW    = 9,
  parameter int unsigned GAIN  = 20,
  parameter int unsigned LAW   = 12
) (
  input  logic              en,
  input  logic [R*DW-1:0]   c_dist,  // C_1..C_R
  output logic [R*LAW-1:0]  la,      // LA_1..LA_R
  output logic [DW-1:0]     fb       // F: the minimum C_i
);

  localparam int unsigned LA_MAX = (1 << LAW) - 1;
  // wide enough for GAIN * (2^DW - 1)
  localparam int unsigned PW = DW + $clog2(GAIN + 1) + 1;

  logic [PW-1:0] drop;

  always_comb begin
    fb = '1;
    for (int i = 0; i < R; i++)
      if (c_dist[i*DW +: DW] < fb) fb = c_dist[i*DW +: DW];
    for (int i = 0; i < R; i++) begin
      drop = PW'(c_dist[i*DW +: DW] - fb) * PW'(GAIN);
      if (!en)                 la[i*LAW +: LAW] = '0;
      else if (drop >= PW'(LA_MAX)) la[i*LAW +: LAW] = '0;
      else                     la[i*LAW +: LAW] = LAW'(LA_MAX - drop);
    end
  end

endmodule

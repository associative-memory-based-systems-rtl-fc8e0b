// wta: behavioural model of the winner-take-all circuit (an analog
// circuit; this model is synthesizable integer arithmetic standing in for
// it).
//
// STAGES common-source stages in cascade.  Every stage turns the highest
// input into the lowest output and spreads the other rows away from it:
// a row's separation e from the stage's best row is multiplied by GAIN and
// clipped at the swing VSAT.  The stage output voltage alternates in
// polarity, so after an odd number of stages the winner row has the lowest
// voltage.  The decision inverters (threshold VTH) give M_i = 1 for rows
// still at the winning level and 0 for all others.  Rows at exactly the
// winner's level (equal distances) all come out as 1; the bank's priority
// encoder resolves them.  Five stages and a per-stage gain of 5 (low end of
// the reported 5-20) follow the document; the voltage scale and threshold
// are this model's own.  Combinational.
module wta #(
  parameter int unsigned R      = 64,
  parameter int unsigned LAW    = 12,
  parameter int unsigned STAGES = 5,
  parameter int unsigned GAIN   = 5
) (
  input  logic [R*LAW-1:0] la,  // LA_1..LA_R, winner highest
  output logic [R-1:0]     m    // M_1..M_R
);

  localparam int unsigned VW   = LAW;
  localparam int unsigned VSAT = (1 << VW) - 1;
  localparam int unsigned VTH  = VSAT / 2;
  localparam int unsigned PW   = VW + $clog2(GAIN + 1) + 1;

  logic [VW-1:0] v     [STAGES+1][R];  // stage voltages, v[0] = LA
  logic [VW-1:0] best  [STAGES];
  logic          hi_wins [STAGES+1];   // polarity: winner highest?
  logic [PW-1:0] e;

  always_comb begin
    for (int i = 0; i < R; i++) v[0][i] = la[i*LAW +: LAW];
    hi_wins[0] = 1'b1;
    for (int s = 0; s < STAGES; s++) begin
      best[s] = hi_wins[s] ? '0 : VW'(VSAT);
      for (int i = 0; i < R; i++)
        if (hi_wins[s] ? (v[s][i] > best[s]) : (v[s][i] < best[s])) best[s] = v[s][i];
      for (int i = 0; i < R; i++) begin
        e = hi_wins[s] ? PW'(best[s] - v[s][i]) : PW'(v[s][i] - best[s]);
        e = e * PW'(GAIN);
        if (e > PW'(VSAT)) e = PW'(VSAT);
        // inverting stage: winner goes low when it came in high and
        // vice versa
        v[s+1][i] = hi_wins[s] ? VW'(e) : VW'(PW'(VSAT) - e);
      end
      hi_wins[s+1] = ~hi_wins[s];
    end
    for (int i = 0; i < R; i++)
      m[i] = hi_wins[STAGES] ? (v[STAGES][i] > VW'(VTH)) : (v[STAGES][i] < VW'(VTH));
  end

endmodule

// muon_tag: Level 2 muon tagging for one long-barrel module. For every D
// cell (D0..D3) whose energy lies between the D-layer lower and upper
// thresholds, the projective BC and A energies behind it are checked:
//   strategy 1: BC and A both inside their [low, high] windows (a minimum
//               ionising particle in all three layers);
//   strategy 2: one of BC or A above its high threshold and the other at
//               least at its low threshold (a muon losing much energy in one
//               layer).
// The D-window first step, the two strategies and run-time thresholds follow
// the ROD description. The projective cells are read from the cell layout of a
// long-barrel module: D0 -> BC1, A1; Dn -> BC(2n)+BC(2n+1), A(2n)+A(2n+1)
// (each D cell spans 0.2 in eta, BC and A cells 0.1). Summing the two cells
// behind a D cell is this design's choice.
// Cell energies (signed, MeV-like units) arrive as one vector; the result is
// registered: valid one clock after start, with a tag bit per D cell, the
// number of tags and the summed energy of each tagged tower.
module muon_tag
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic signed [19:0] cell_e [N_CELL],
  input  logic signed [19:0] thr_lo [3],   // 0: D, 1: BC, 2: A
  input  logic signed [19:0] thr_hi [3],
  output logic        valid,
  output logic [N_DCELL-1:0] tag,
  output logic [2:0]  ntag,
  output logic signed [21:0] tag_e [N_DCELL]
);
  logic [N_DCELL-1:0] t;
  logic signed [21:0] ed [N_DCELL], ebc [N_DCELL], ea [N_DCELL];
  always_comb begin
    for (int n = 0; n < N_DCELL; n++) begin
      ed[n] = 22'(cell_e[CELL_D0 + n]);
      if (n == 0) begin
        ebc[n] = 22'(cell_e[CELL_BC0]);
        ea[n]  = 22'(cell_e[CELL_A0]);
      end else begin
        ebc[n] = 22'(cell_e[CELL_BC0 + 2*n - 1]) + 22'(cell_e[CELL_BC0 + 2*n]);
        ea[n]  = 22'(cell_e[CELL_A0 + 2*n - 1])  + 22'(cell_e[CELL_A0 + 2*n]);
      end
      t[n] = (ed[n] >= 22'(thr_lo[0]) && ed[n] <= 22'(thr_hi[0])) &&
             ( (ebc[n] >= 22'(thr_lo[1]) && ebc[n] <= 22'(thr_hi[1]) &&
                ea[n]  >= 22'(thr_lo[2]) && ea[n]  <= 22'(thr_hi[2])) ||
               (ebc[n] >  22'(thr_hi[1]) && ea[n]  >= 22'(thr_lo[2])) ||
               (ea[n]  >  22'(thr_hi[2]) && ebc[n] >= 22'(thr_lo[1])) );
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; tag <= '0; ntag <= '0;
      for (int n = 0; n < N_DCELL; n++) tag_e[n] <= '0;
    end else begin
      valid <= start;
      if (start) begin
        tag <= t;
        ntag <= 3'($countones(t));
        for (int n = 0; n < N_DCELL; n++) tag_e[n] <= t[n] ? ed[n] + ebc[n] + ea[n] : '0;
      end
    end
  end
endmodule

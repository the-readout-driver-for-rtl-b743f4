// et_sum: total transverse energy of one module and its X and Y projections.
// Cell energies are first gathered into the projective towers of a
// long-barrel module (eta bins of 0.1): tower t holds cell A(t+1), cell
// BC(t+1) for t<8 or B9 for t=8, and the D cell over it (D0 whole in tower 0;
// D1, D2, D3 split in halves over towers 1-2, 3-4, 5-6). Each tower energy is
// multiplied by its sin(theta) factor from a look-up table and summed, one
// tower per clock; then Ex = Et*cos(phi) and Ey = Et*sin(phi) with the
// module's azimuth factors. Towers, trigonometric factors in a look-up table
// and the X/Y projections follow the ROD description; the D-cell split and the
// Q1.15 factor format are this design's choices.
// Table write: lut_addr 0..9 = sin(theta) of tower (unsigned Q1.15),
// 14 = cos(phi), 15 = sin(phi) (signed Q1.15).
// Timing: start when ready; valid N_TOWER+2 clocks later.
module et_sum
  import rod_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic signed [19:0] cell_e [N_CELL],
  input  logic        lut_we,
  input  logic [3:0]  lut_addr,
  input  logic [15:0] lut_data,
  output logic        ready,
  output logic        valid,
  output logic signed [23:0] et,
  output logic signed [23:0] ex,
  output logic signed [23:0] ey
);
  logic [15:0] sin_th [N_TOWER];
  logic signed [15:0] cos_ph, sin_ph;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N_TOWER; t++) sin_th[t] <= 16'h8000 - 16'h1;
      cos_ph <= 16'sh7FFF; sin_ph <= '0;
    end else if (lut_we) begin
      if (lut_addr < 4'(N_TOWER)) sin_th[lut_addr] <= lut_data;
      else if (lut_addr == 4'd14) cos_ph <= lut_data;
      else if (lut_addr == 4'd15) sin_ph <= lut_data;
    end
  end

  function automatic logic signed [23:0] tower_e(input logic signed [19:0] c [N_CELL], input int t);
    logic signed [23:0] e;
    e = 24'(c[CELL_A0 + t]);
    if (t < 8)       e += 24'(c[CELL_BC0 + t]);
    else if (t == 8) e += 24'(c[CELL_BC0 + 8]);
    if (t == 0)                 e += 24'(c[CELL_D0]);
    else if (t >= 1 && t <= 6)  e += 24'(c[CELL_D0 + (t + 1) / 2]) >>> 1;
    return e;
  endfunction

  logic [3:0] t;
  logic       run, proj;
  logic signed [23:0] te;
  logic signed [39:0] prod;
  assign te = tower_e(cell_e, int'(t));
  assign prod = 40'(te) * 40'(signed'({1'b0, sin_th[t]}));
  logic signed [23:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; run <= 1'b0; proj <= 1'b0; acc <= '0; valid <= 1'b0;
      et <= '0; ex <= '0; ey <= '0;
    end else begin
      valid <= 1'b0;
      if (start && !run && !proj) begin
        run <= 1'b1; t <= '0; acc <= '0;
      end else if (run) begin
        acc <= acc + 24'(prod >>> 15);
        if (t == 4'(N_TOWER - 1)) begin run <= 1'b0; proj <= 1'b1; end
        else t <= t + 1'b1;
      end else if (proj) begin
        proj <= 1'b0; valid <= 1'b1;
        et <= acc;
        ex <= 24'((40'(acc) * 40'(cos_ph)) >>> 15);
        ey <= 24'((40'(acc) * 40'(sin_ph)) >>> 15);
      end
    end
  end
  assign ready = !run && !proj;
endmodule

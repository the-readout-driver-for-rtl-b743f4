// of_engine: Optimal Filtering reconstruction of one channel. From the
// digital samples S_i it forms, with weights read from a table,
//   A = sum a_i S_i          (amplitude)
//   B = sum b_i S_i = A*tau  (amplitude times phase)
//   P = sum c_i S_i          (pedestal)
//   tau = B / A
//   QF = sum (S_i - (A g_i + B g'_i + P))^2
// where g and g' are the normalised pulse shape and its derivative at the
// chosen phase. In the iterative mode the first phase is taken from the index
// of the maximum sample, tau_0 = 25*(i_c - i_max) ns, and three iterations
// follow, iteration k using the weights for tau_{k-1} (rounded to 1 ns) and
// producing A_k and tau_k = B_k/A_k. In the fixed mode the weights for 0 ns are
// used once. The equations, the 3 iterations, the 25 ns sample spacing and the
// -75..+75 ns / 1 ns weight grid follow the ROD description. Fixed point
// (this design's choice): weights are signed 16 bit with 10 fractional bits,
// A, B and P are rounded down to whole ADC counts (B in count*ns), tau is
// reported with 4 fractional bits (1/16 ns), QF saturates at 16 bits.
// The weight table holds one row of 5x7 weights per gain and phase and is
// written one weight at a time: waddr = {gain, phase index (0..150),
// kind (0 a, 1 b, 2 c, 3 g, 4 g'), sample}.
// Timing: start is taken when ready; valid pulses 4 clocks after start in
// the fixed mode (a new channel every 4 clocks) and 10 clocks after start in
// the iterative mode.
module of_engine
  import rod_pkg::*;
#(
  parameter int NPH = N_PHASE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        iterative,
  input  logic        gain,
  input  logic [ADC_W-1:0] samp [N_SAMP],
  output logic        ready,
  output logic        valid,
  output logic signed [18:0] amp,
  output logic signed [15:0] phase,   // ns, TFRAC fractional bits
  output logic signed [18:0] ped,
  output logic [15:0] qf,
  // weight table write port
  input  logic        w_we,
  input  logic [14:0] w_addr,
  input  logic signed [W_W-1:0] w_data
);
  localparam int ROW = N_KIND * N_SAMP * W_W;
  localparam int CENTER = -PHASE_MIN;          // index of 0 ns
  localparam int DEPTH = 2 * NPH;

  logic [ROW-1:0] wmem [DEPTH];
  logic [ROW-1:0] row;
  logic [$clog2(DEPTH)-1:0] raddr;

  // ---- weight table write ----
  logic        wg;
  logic [7:0]  wph;
  logic [2:0]  wk, ws;
  assign {wg, wph, wk, ws} = w_addr;
  always_ff @(posedge clk) begin
    if (w_we && wph < 8'(NPH) && wk < 3'(N_KIND) && ws < 3'(N_SAMP))
      wmem[wg ? NPH + int'(wph) : int'(wph)][(int'(wk)*N_SAMP + int'(ws))*W_W +: W_W] <= w_data;
  end
  always_ff @(posedge clk) row <= wmem[raddr];

  function automatic logic signed [W_W-1:0] wt(input logic [ROW-1:0] r, input int k, input int i);
    return r[(k*N_SAMP + i)*W_W +: W_W];
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RD, S_ABP, S_OUT} st_t;
  st_t st;
  logic [ADC_W-1:0] s [N_SAMP];
  logic       g, iter;
  logic [1:0] k;
  logic [7:0] ph;                      // phase index 0..150

  // ---- sums of products (combinational on the registered row) ----
  logic signed [31:0] sa, sb, sc;
  always_comb begin
    sa = '0; sb = '0; sc = '0;
    for (int i = 0; i < N_SAMP; i++) begin
      sa += 32'(wt(row, K_A, i)) * 32'(signed'({1'b0, s[i]}));
      sb += 32'(wt(row, K_B, i)) * 32'(signed'({1'b0, s[i]}));
      sc += 32'(wt(row, K_C, i)) * 32'(signed'({1'b0, s[i]}));
    end
  end
  logic signed [18:0] a_n, b_n, p_n;
  assign a_n = 19'(sa >>> WFRAC);
  assign b_n = 19'(sb >>> WFRAC);
  assign p_n = 19'(sc >>> WFRAC);

  // ---- phase = B / A with TFRAC fractional bits ----
  logic signed [31:0] tau_q;
  always_comb begin
    if (a_n > 0) tau_q = (32'(b_n) <<< TFRAC) / 32'(a_n);
    else         tau_q = '0;
  end
  // next weight index: tau rounded to 1 ns, clamped to the table
  logic signed [31:0] tau_ns;
  logic [7:0] ph_next;
  always_comb begin
    tau_ns = (tau_q + 32'sd8) >>> TFRAC;
    if (tau_ns < PHASE_MIN)      ph_next = 8'd0;
    else if (tau_ns > -PHASE_MIN) ph_next = 8'(NPH - 1);
    else                          ph_next = 8'(tau_ns + CENTER);
  end

  // ---- quality factor with A, B, P of the last iteration ----
  logic [31:0] qsum;
  always_comb begin
    logic signed [47:0] fit;
    logic signed [31:0] r;
    qsum = '0;
    for (int i = 0; i < N_SAMP; i++) begin
      fit = 48'(a_n) * 48'(wt(row, K_G, i)) + 48'(b_n) * 48'(wt(row, K_GD, i));
      r   = 32'(signed'({1'b0, s[i]})) - 32'(fit >>> WFRAC) - 32'(p_n);
      if (r > 32'sd255 || r < -32'sd255) qsum = 32'h0001_0000;
      else if (qsum < 32'h0001_0000)  qsum = qsum + 32'(r * r);
    end
  end

  // index of the maximum sample (first one if equal)
  logic [2:0] imax;
  always_comb begin
    imax = '0;
    for (int i = 1; i < N_SAMP; i++) if (samp[i] > samp[imax]) imax = 3'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; g <= 1'b0; iter <= 1'b0; k <= '0; ph <= 8'(CENTER); raddr <= '0;
      valid <= 1'b0; amp <= '0; phase <= '0; ped <= '0; qf <= '0;
      for (int i = 0; i < N_SAMP; i++) s[i] <= '0;
    end else begin
      valid <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          s <= samp; g <= gain; iter <= iterative; k <= 2'd1;
          if (iterative) ph <= 8'(CENTER + 25 * (C_SAMP - int'(imax)));
          else           ph <= 8'(CENTER);
          st <= S_RD;
        end
        S_RD: begin
          raddr <= g ? ($clog2(DEPTH))'(NPH + int'(ph)) : ($clog2(DEPTH))'(ph);
          st <= S_ABP;
        end
        S_ABP: st <= S_OUT;            // row valid in this state's next cycle
        S_OUT: begin
          if (iter && k != 2'(OF_ITER)) begin
            k <= k + 1'b1; ph <= ph_next; st <= S_RD;
          end else begin
            valid <= 1'b1;
            amp <= a_n; ped <= p_n; phase <= 16'(tau_q);
            qf <= (qsum > 32'h0000_FFFF) ? 16'hFFFF : qsum[15:0];
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign ready = (st == S_IDLE);
endmodule

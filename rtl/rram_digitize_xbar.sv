// rram_digitize_xbar: BEHAVIOURAL MODEL (not synthesizable logic) of the
// binary RRAM digitizing crossbar, step 1 of the in-memory inner product.
//
// The part is analog: N word lines cross N bit lines, each cross-point holds
// one RRAM cell that is either on (g_on) or off (g_off). All N columns store
// the same N-bit vector phi ("identical columns"). Driving word line i with
// V_r when x_i = 1 makes every bit line carry I = V_r * sum_i x_i*g(phi_i),
// which a fixed resistor R_s turns into V_BL = I * R_s. Each bit line has its
// own sense amplifier, and the thresholds form a ladder
//     V_th,k = (2k+1) * V_r * g_on * R_s / 2,   k = 0 .. N-1
// so column k reads 1 exactly when the inner product s = x . phi exceeds k:
// the output is a thermometer code whose first s bits are 1 (o1[k], k counted
// from 0). This model computes those currents and voltages with real numbers.
//
// The source also lets each sense threshold be configured. Here every column
// has a threshold code th_k, in units of half a conductance step
// (V_th,k = th_k * V_r * g_on * R_s / 2); reset loads the ladder th_k = 2k+1,
// and th_we/th_col/th_code overwrite one column's code, which turns the
// columns into general threshold gates on the same inner product.
//
// Interface: cfg_we with cfg_phi programs phi into every column on the rising
// clock edge (the cells are non-volatile, so reset leaves them alone; only
// the CMOS threshold references are reset). wl is the word-line pattern x;
// o1 follows wl, the stored cells and the thresholds combinationally; th_q
// shows the current threshold codes for read-back.
// The on/off conductances, V_r and R_s are not given numerically by the
// source; the defaults below are this model's choice (an on/off ratio of
// 1000 keeps the leakage of N off cells far below half a threshold step).
// The ladder and its configurability follow the source; the code format is
// this model's.
module rram_digitize_xbar #(
  parameter int unsigned N     = 16,
  parameter real         VR    = 0.2,     // read voltage on an active word line (V)
  parameter real         G_ON  = 1.0e-4,  // on-state conductance (S)
  parameter real         G_OFF = 1.0e-7,  // off-state conductance (S)
  parameter real         RS    = 1.0e3,   // sense resistor R_s (ohm)
  parameter int unsigned TH_W  = 8        // width of a threshold code
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [N-1:0]         cfg_phi,
  input  logic                 th_we,
  input  logic [$clog2(N)-1:0] th_col,
  input  logic [TH_W-1:0]      th_code,
  output logic [N-1:0][TH_W-1:0] th_q,
  input  logic [N-1:0]         wl,
  output logic [N-1:0]         o1
);

  // cells[i][j]: state of the RRAM cell at word line i, bit line j.
  logic [N-1:0][N-1:0] cells;

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      for (int i = 0; i < N; i++) cells[i] <= {N{cfg_phi[i]}};
    end
  end

  // sense-amplifier threshold references
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) th_q[k] <= TH_W'(2 * k + 1);
    end else if (th_we) begin
      th_q[th_col] <= th_code;
    end
  end

  function automatic real vth(input logic [TH_W-1:0] code);
    return real'(code) * VR * G_ON * RS / 2.0;
  endfunction

  always_comb begin
    for (int j = 0; j < N; j++) begin
      real i_bl;
      real v_bl;
      i_bl = 0.0;
      for (int i = 0; i < N; i++) begin
        if (wl[i]) i_bl = i_bl + VR * (cells[i][j] ? G_ON : G_OFF);
      end
      v_bl  = i_bl * RS;
      o1[j] = (v_bl >= vth(th_q[j]));
    end
  end

endmodule

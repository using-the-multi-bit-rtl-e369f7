// memristor_cell: behavioural (not synthesizable) model of one multi-level
// memristor cell with the series resistor of its threshold read circuit.
//
// Linear dopant-drift model with a window function:
//   R_mem(x) = R_ON * x + R_OFF * (1 - x),   x = w / D in [0, 1]
//   dx/dt    = k * i(t) * f(x),  k = mu_v * R_ON / D^2
//   f(x)     = 1 - (2x - 1)^(2p)
// The cell sits between the driven line v_p and the intermediate node; the
// resistor R_S runs from that node to ground (Vn = 0), so
//   i = v_p / (R_mem + R_S),  v_node = i * R_S.
// A positive current raises x and lowers R_mem. The state is integrated with
// forward Euler once per simulation time unit, which stands for DT_S
// seconds of model time (1 ms by default). x stays a little inside the open
// interval (0, 1): the window is zero at 0 and 1, and a state that an Euler
// step had put exactly there could never move again. Any of
// x's values is stable when v_p = 0, which is what lets one cell hold one of
// three levels. The equations and the form of the window come from the
// memristor model the design builds on; the device constants are typical
// published values (R_S and the 1.2 V drive of the example set-up are the
// design's), chosen here where none were given.
module memristor_cell #(
  parameter real R_ON   = 100.0,     // ohm, fully doped
  parameter real R_OFF  = 16000.0,   // ohm, undoped
  parameter real R_S    = 100.0,     // ohm, read/series resistor
  parameter real MU_V   = 1.0e-14,   // m^2/(V s), dopant mobility
  parameter real D_M    = 1.0e-8,    // m, device thickness
  parameter int  P_WIN  = 10,        // window exponent p
  parameter real DT_S   = 1.0e-3,    // s of model time per time unit
  parameter real X_INIT = 0.5,
  parameter real X_EPS  = 1.0e-3     // x is kept inside (X_EPS, 1 - X_EPS)
) (
  input  real v_p,      // voltage driven onto the cell's line, V
  output real v_node,   // intermediate node voltage, V
  output real i_mem,    // current through the cell, A
  output real r_mem,    // present resistance, ohm
  output real x_state   // present normalised state w / D
);
  localparam real K = MU_V * R_ON / (D_M * D_M);

  real x;

  function automatic real window(real xv);
    real t;
    t = 2.0 * xv - 1.0;
    return 1.0 - t ** (2.0 * real'(P_WIN));
  endfunction

  initial x = X_INIT;

  assign r_mem   = R_ON * x + R_OFF * (1.0 - x);
  assign i_mem   = v_p / (r_mem + R_S);
  assign v_node  = i_mem * R_S;
  assign x_state = x;

  always begin
    #1;
    x = x + K * i_mem * window(x) * DT_S;
    if (x < X_EPS) x = X_EPS;
    if (x > 1.0 - X_EPS) x = 1.0 - X_EPS;
  end
endmodule

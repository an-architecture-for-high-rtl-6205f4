// Behavioural model of the analog fine stages of a delay line: inverter
// chain and rising/falling edge adjust. Not synthesizable: delays are
// modelled with timing controls.
//
// Inverter chain: ic[19:0] one-hot selects a tap every IC_STEP_PS (an
// inverter pair, 2 ns); ic[20] forces a constant 0 and ic[21] a constant 1
// at the output (used during calibration to observe each stage on its own);
// with no bit set the output is 0. Edge adjust: the chain output passes two
// NAND-based adjust units, one delaying only rising edges and one only
// falling edges. Each unit's 8-bit field is modelled as a one-hot coarse tap
// in bits 3:0 (a 4-stage inverter chain, EC_COARSE_PS per stage) and a
// one-hot fine tap in bits 7:4 (differential inverter pairs, EC_FINE_PS per
// step). An edge leaves after T0_PS + chain delay + adjust delay; ecr acts on
// rising and ecf on falling output edges, which is how the four pulse edges
// of the force timing generator are calibrated independently.
// Step sizes (2 ns chain, 0.6 ns fine resolution) follow the architecture; the
// intrinsic delay T0_PS and the coding of the 8-bit adjust fields are this
// model's choice. All delays are integer picoseconds (time unit of this file).
`timescale 1ps/1ps
module fine_delay #(
  parameter int T0_PS        = 1000,
  parameter int IC_STEP_PS   = 2000,
  parameter int EC_COARSE_PS = 2000,
  parameter int EC_FINE_PS   = 600
) (
  input  logic        din,
  input  logic [23:0] ic,
  input  logic [7:0]  ecr,
  input  logic [7:0]  ecf,
  output logic        dout
);
  function automatic int tap_of(input logic [31:0] f, input int n, input int step);
    int d = 0;
    for (int i = 0; i < n; i++) if (f[i]) d = step * i;
    return d;
  endfunction

  int t_ic, t_rise, t_fall;
  logic edge_q;

  always_comb begin
    t_ic   = T0_PS + tap_of(32'(ic), 20, IC_STEP_PS);
    t_rise = t_ic + tap_of(32'(ecr[3:0]), 4, EC_COARSE_PS) + tap_of(32'(ecr[7:4]), 4, EC_FINE_PS);
    t_fall = t_ic + tap_of(32'(ecf[3:0]), 4, EC_COARSE_PS) + tap_of(32'(ecf[7:4]), 4, EC_FINE_PS);
  end

  // din delayed by the rising-edge and by the falling-edge delay (transport);
  // the output takes its rising edges from the first and its falling edges
  // from the second (valid for input pulses longer than |t_rise - t_fall|).
  logic r_d, f_d;
  always @(din) r_d <= #(t_rise) din;
  always @(din) f_d <= #(t_fall) din;
  assign edge_q = (t_rise <= t_fall) ? (r_d | f_d) : (r_d & f_d);

  assign dout = ic[21] ? 1'b1 :
                (ic[20] || ic[19:0] == '0) ? 1'b0 : edge_q;
endmodule

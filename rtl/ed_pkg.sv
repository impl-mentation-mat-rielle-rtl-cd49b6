// Shared widths, types and curve functions of the event-driven ODLM network.
//
// The network stores each neuron as a predicted firing time. Times, phases
// (time left to threshold) and potentials are 13-bit codes, pixel values 8
// bits and synaptic weights 9 bits, the widths the design was built with on
// its FPGA. The potential code 2^13-1 stands for the firing threshold and one
// full charge from potential 0 to the threshold lasts 2^13-1 time ticks; that
// scaling is this design's choice.
//
// The functions below compute look-up table contents at elaboration time from
// the leaky integrate-and-fire charging curve p(t) = I0/tau * (1 - exp(-t/tau))
// and from the sigmoid weight rule. They are used only to fill ROMs.
package ed_pkg;

  localparam int unsigned IDW    = 16;  // neuron ID width (65 536 neurons)
  localparam int unsigned TIME_W = 13;  // firing time / phase width
  localparam int unsigned POT_W  = 13;  // membrane potential width
  localparam int unsigned PIX_W  = 8;   // pixel (feature) width
  localparam int unsigned WGT_W  = 9;   // synaptic weight width
  localparam int unsigned SNW    = 17;  // synapse number width (up to 65 536 synapses)

  // Potential code of the firing threshold.
  localparam logic [POT_W-1:0] VTH_CODE = '1;

  // Event-queue operations.
  typedef enum logic [1:0] {
    Q_INSERT = 2'd0,   // add an element
    Q_DELETE = 2'd1,   // remove the element with this ID
    Q_UPDATE = 2'd2,   // delete then insert with a new firing time
    Q_READ   = 2'd3    // look the element up
  } q_op_e;

  // One element of the event queue: a neuron and its predicted firing time.
  typedef struct packed {
    logic              valid;
    logic [IDW-1:0]    id;
    logic [TIME_W-1:0] time_;
    logic [PIX_W-1:0]  pix;
  } q_elem_t;

  // One word of the neuron state memory.
  typedef struct packed {
    logic              active;  // 0 for border neurons that never fire
    logic [TIME_W-1:0] ftime;   // predicted firing time
    logic [PIX_W-1:0]  pix;     // pixel value (feature)
  } nstate_t;

  // Charging-curve shape constant K = T/tau where T is the time a neuron
  // starting at 0 takes to reach the threshold: T = -tau*ln(1 - vth*tau/i0).
  function automatic real curve_k(real i0, real tau, real vth);
    return -$ln(1.0 - vth * tau / i0);
  endfunction

  // Potential code for a neuron whose time left to threshold is `left`.
  function automatic int unsigned pot_of_left(int unsigned left, real k);
    real full, x, p;
    full = real'((1 << TIME_W) - 1);
    x    = (full - real'(left)) / full;             // elapsed fraction of the period
    p    = (1.0 - $exp(-k * x)) / (1.0 - $exp(-k));  // normalised potential
    return int'($floor(p * real'(VTH_CODE) + 0.5));
  endfunction

  // Time left to threshold for a neuron at potential code `pot`.
  function automatic int unsigned left_of_pot(int unsigned pot, real k);
    real full, p, x;
    full = real'((1 << TIME_W) - 1);
    p    = real'(pot) / real'(VTH_CODE);
    x    = -$ln(1.0 - p * (1.0 - $exp(-k))) / k;     // elapsed fraction
    return int'($floor((1.0 - x) * full + 0.5));
  endfunction

  // Synaptic weight code for an absolute pixel difference `d` (0..255).
  function automatic int unsigned weight_of_diff(int unsigned d, real wmax, real alpha, real delta);
    real f, w;
    f = real'(d) / 255.0;
    w = wmax * (1.0 - 1.0 / (1.0 + $exp(-(alpha * f - delta))));
    return int'($floor(w * real'(VTH_CODE) + 0.5));
  endfunction

  // Priority key: time left from `now`, modulo 2^TIME_W.
  function automatic logic [TIME_W-1:0] key_of(logic [TIME_W-1:0] t, logic [TIME_W-1:0] now);
    return t - now;
  endfunction

endpackage

// nr_pkg: types and constants shared by the neural receiver.
//
// Every neuron input, weight and neuron output is a 5-bit sign-magnitude
// number in the <5,2> format: one sign bit, then a 4-bit magnitude with two
// integer and two fraction bits (value = mag / 4, range -3.75 .. +3.75).
// Neurons work bit-serially on words of WORD = N_MAG + 2 = 6 clocks.
// The activation table maps the five most significant bits of the 6-bit
// neuron sum h (h counted in units of 1/2, so the table address is in units
// of 1) to round(4 * f(a)) with f(a) = (1 - e^-a) / (1 + e^-a).
// The original description calls <5,2> a two's complement format in one
// place but feeds the multipliers and the next layer with sign-magnitude
// numbers; sign-magnitude is used here for all of them.
// The 10-10-1 sizes, n = 4, the 6-clock word, the <5,2> format, the 32-word
// table and the 121-word weight memory are the document's. The bias input
// (the eleventh input of every neuron, held at +1.0) and the rounding of the
// table are this design's choices.
package nr_pkg;

  localparam int unsigned N_MAG   = 4;            // n: magnitude bits
  localparam int unsigned WORD    = N_MAG + 2;    // clocks per serial word
  localparam int unsigned M_WIN   = 5;            // observation window m
  localparam int unsigned N_HID   = 10;           // hidden neurons
  localparam int unsigned N_IN    = 2 * M_WIN + 1; // inputs per neuron, bias included
  localparam int unsigned N_NEUR  = N_HID + 1;    // hidden plus output neuron
  localparam int unsigned N_WEIGHTS = N_NEUR * N_IN; // 121

  typedef struct packed {
    logic             s;    // 1 = negative
    logic [N_MAG-1:0] mag;  // <5,2> magnitude, LSB = 1/4
  } sm5_t;

  // Constant bias input: +1.0 in <5,2>.
  localparam sm5_t BIAS_IN = '{s: 1'b0, mag: 4'd4};

  // Magnitude of round(4 * f(a)), f(a) = (1 - e^-a) / (1 + e^-a).
  function automatic logic [N_MAG-1:0] act_mag(input int a);
    real x, f;
    x = (a < 0) ? -a : a;
    f = (1.0 - $exp(-x)) / (1.0 + $exp(-x));
    return N_MAG'(int'($floor(f * 4.0 + 0.5)));
  endfunction

  // 32-word magnitude table, indexed by the 5-bit two's complement address.
  typedef logic [31:0][N_MAG-1:0] act_table_t;
  function automatic act_table_t act_table();
    act_table_t t;
    for (int i = 0; i < 32; i++) t[i] = act_mag((i < 16) ? i : i - 32);
    return t;
  endfunction

endpackage

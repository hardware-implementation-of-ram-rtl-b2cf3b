// ram_nn_pkg: sizes of the 340-neuron RAM network and the elaboration-time
// functions that fix its connections and its trained contents.
//
// Sizes follow the network this RTL implements: a 24 x 16 binary image
// (384 pixels), 10 classes, 34 twelve-input neurons per class, split over
// four neuron chips of 96 pixels each (three with 8 neurons per class and a
// 3-bit count, one with 10 neurons per class and a 4-bit count) and one
// decision chip.
//
// The neuron contents are data produced by training, not part of the
// circuit. This package produces them with constant functions so the network
// can be elaborated stand-alone:
//   * glyph_pixel   - a seven-segment style drawing of each digit on the grid
//                     (this design's own stand-in for scanned characters);
//   * sample_pixel  - pattern k of a class: the glyph with each pixel flipped
//                     when a 32-bit hash of (class, k, pixel) falls below
//                     NOISE_THRESH/256. Patterns 0..N_TRAIN-1 train the net;
//                     higher k give unseen test patterns;
//   * neuron_pixel  - which image pixel drives input i of neuron j of a class
//                     on a chip: a pseudo-random affine permutation modulo 96
//                     of the chip's pixels (a second map serves the 24 extra
//                     inputs on the 10-neuron chip, so some pixels feed twice);
//   * neuron_terms  - the training addresses of one neuron, i.e. the truth
//                     table entries written to 1, as a list of minterms.
// Pixel index = row*16 + column. Neuron input i is the neuron's e(i+1).
package ram_nn_pkg;

  localparam int unsigned IMG_ROWS          = 24;
  localparam int unsigned IMG_COLS          = 16;
  localparam int unsigned N_PIXELS          = IMG_ROWS * IMG_COLS;  // 384
  localparam int unsigned N_CLASSES         = 10;
  localparam int unsigned N_INPUTS          = 12;   // inputs per neuron
  localparam int unsigned NEURONS_PER_CLASS = 34;
  localparam int unsigned N_CHIPS           = 4;    // neuron chips IC1..IC4
  localparam int unsigned CHIP_PIXELS       = 96;   // a quarter of the image
  localparam int unsigned NEURONS_SMALL     = 8;    // per class, IC1..IC3
  localparam int unsigned NEURONS_LARGE     = 10;   // per class, IC4
  localparam int unsigned COUNT_W_SMALL     = 3;
  localparam int unsigned COUNT_W_LARGE     = 4;
  localparam int unsigned CLASS_W           = 4;
  localparam int unsigned SUM_W             = $clog2(NEURONS_PER_CLASS + 1);  // 6
  localparam int unsigned MAX_TRAIN         = 195;  // training patterns per class
  localparam int unsigned NOISE_THRESH      = 16;   // flip probability 16/256

  typedef logic [N_INPUTS-1:0] addr_t;
  typedef addr_t terms_t [MAX_TRAIN];

  // 32-bit integer hash (xor-shift / multiply mixer).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] v;
    v = x ^ (x >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  // Noise-free drawing of digit cls: segments a..g of a seven-segment digit,
  // two pixels thick, on rows 1..22 and columns 2..13.
  function automatic logic glyph_pixel(input int unsigned cls, input int unsigned p);
    int unsigned r, c;
    logic [6:0] seg;
    logic hor, top_h, mid_h, bot_h, left_v, right_v, up_v, lo_v;
    r = p / IMG_COLS;
    c = p % IMG_COLS;
    case (cls)
      0: seg = 7'h3F;  1: seg = 7'h06;  2: seg = 7'h5B;  3: seg = 7'h4F;
      4: seg = 7'h66;  5: seg = 7'h6D;  6: seg = 7'h7D;  7: seg = 7'h07;
      8: seg = 7'h7F;  default: seg = 7'h6F;
    endcase
    hor     = (c >= 2) && (c <= 13);
    top_h   = hor && (r == 1 || r == 2);
    mid_h   = hor && (r == 11 || r == 12);
    bot_h   = hor && (r == 21 || r == 22);
    left_v  = (c == 2 || c == 3);
    right_v = (c == 12 || c == 13);
    up_v    = (r >= 1) && (r <= 12);
    lo_v    = (r >= 11) && (r <= 22);
    return (seg[0] && top_h) || (seg[1] && right_v && up_v) ||
           (seg[2] && right_v && lo_v) || (seg[3] && bot_h) ||
           (seg[4] && left_v && lo_v) || (seg[5] && left_v && up_v) ||
           (seg[6] && mid_h);
  endfunction

  // Pixel p of noisy pattern k of class cls.
  function automatic logic sample_pixel(input int unsigned cls, input int unsigned k,
                                        input int unsigned p);
    logic [7:0] h;
    h = 8'(mix32(mix32(32'(cls * 65536 + k)) ^ 32'(p)));
    return glyph_pixel(cls, p) ^ (h < 8'(NOISE_THRESH));
  endfunction

  // Image pixel feeding input i of neuron j of class cls on chip ch.
  function automatic int unsigned neuron_pixel(input int unsigned ch, input int unsigned cls,
                                               input int unsigned j, input int unsigned i);
    logic [31:0] h;  // bits 7:5 are left unused
    int unsigned s, u, a, b, local_p;
    s = j * N_INPUTS + i;                       // connection slot
    h = mix32(32'(ch * 1024 + cls * 2 + (s >= CHIP_PIXELS ? 1 : 0)) ^ 32'h5a17_c3e1);
    u = 32'(h[4:0]);                               // one of 32 units modulo 96
    a = 6 * (u >> 1) + ((u & 1) != 0 ? 5 : 1);  // 1,5,7,11,...,95: coprime to 96
    b = 32'(h[31:8]) % CHIP_PIXELS;
    local_p = (a * s + b) % CHIP_PIXELS;
    return ch * CHIP_PIXELS + local_p;
  endfunction

  // Address that pattern k of class cls presents to neuron j of chip ch.
  function automatic addr_t neuron_address(input int unsigned ch, input int unsigned cls,
                                           input int unsigned j, input int unsigned k);
    addr_t a;
    for (int unsigned i = 0; i < N_INPUTS; i++)
      a[i] = sample_pixel(cls, k, neuron_pixel(ch, cls, j, i));
    return a;
  endfunction

  // Trained minterms of a neuron: one per training pattern of its class.
  // Entries from n_train up to MAX_TRAIN repeat the first one.
  function automatic terms_t neuron_terms(input int unsigned ch, input int unsigned cls,
                                          input int unsigned j, input int unsigned n_train);
    terms_t t;
    addr_t a;
    for (int unsigned k = 0; k < MAX_TRAIN; k++) begin
      a = neuron_address(ch, cls, j, (k < n_train) ? k : 0);
      t[k] = a;
    end
    return t;
  endfunction

endpackage

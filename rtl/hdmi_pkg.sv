// hdmi_pkg: types, tables and the bus-placement function of the HDMI controller.
//
// video_timing_t  one video mode: visible area, front porch, sync pulse and back
//                 porch, in pixels (horizontal) and lines (vertical).
// pll_regs_t      the ten clock-controller register values that set the pixel
//                 clock of a mode.
// ycbcr_pair_t    two neighbouring pixels in YCbCr 4:2:2: their own lumas
//                 y1, y2 and one shared pair of chromas cb, cr, 12 bits each.
// adv_place       packs one chroma and one luma sample onto the 24-bit input bus
//                 of the ADV7511 transmitter in its "YCbCr 4:2:2, 24 bit, style 1,
//                 evenly distributed" format: chroma[11:4] on D[23:16], luma[11:4]
//                 on D[15:8], chroma[3:0] on D[7:4], luma[3:0] on D[3:0].
//
// Mode 0 is the VESA 1920x1440 @ 60 Hz mode (234 MHz pixel clock) of the
// document. Modes 1..3 are standard modes added by this design from the
// VESA/CEA timing standards (1920x1200 reduced blanking, 1920x1080, 1280x720).
// The document prints one set of clock-controller register values; it is used
// for every mode, so the pixel clock of modes 1..3 has to be supplied for
// real hardware by replacing MODE_PLL entries.
package hdmi_pkg;

  typedef struct packed {
    logic [11:0] active;
    logic [11:0] fporch;
    logic [11:0] sync;
    logic [11:0] bporch;
  } axis_timing_t;

  typedef struct packed {
    axis_timing_t h;
    axis_timing_t v;
  } video_timing_t;

  typedef struct packed {
    logic [15:0] clk_fb1;
    logic [15:0] clk_fb2;
    logic [15:0] clk_div;
    logic [15:0] clk_out1;
    logic [15:0] clk_out2;
    logic [15:0] lock1;
    logic [15:0] lock2;
    logic [15:0] lock3;
    logic [15:0] filter1;
    logic [15:0] filter2;
  } pll_regs_t;

  localparam int unsigned PLL_NUM_REGS = 10;

  typedef struct packed {
    logic [11:0] cb;
    logic [11:0] cr;
    logic [11:0] y1;
    logic [11:0] y2;
  } ycbcr_pair_t;

  localparam int unsigned NUM_MODES = 4;

  typedef video_timing_t mode_timing_table_t [NUM_MODES];
  typedef pll_regs_t     mode_pll_table_t    [NUM_MODES];

  localparam video_timing_t MODE_1920X1440 = '{
    h: '{active: 12'd1920, fporch: 12'd128, sync: 12'd208, bporch: 12'd344},
    v: '{active: 12'd1440, fporch: 12'd1,   sync: 12'd3,   bporch: 12'd56}};
  localparam video_timing_t MODE_1920X1200 = '{
    h: '{active: 12'd1920, fporch: 12'd48,  sync: 12'd32,  bporch: 12'd80},
    v: '{active: 12'd1200, fporch: 12'd3,   sync: 12'd6,   bporch: 12'd26}};
  localparam video_timing_t MODE_1920X1080 = '{
    h: '{active: 12'd1920, fporch: 12'd88,  sync: 12'd44,  bporch: 12'd148},
    v: '{active: 12'd1080, fporch: 12'd4,   sync: 12'd5,   bporch: 12'd36}};
  localparam video_timing_t MODE_1280X720 = '{
    h: '{active: 12'd1280, fporch: 12'd110, sync: 12'd40,  bporch: 12'd220},
    v: '{active: 12'd720,  fporch: 12'd5,   sync: 12'd5,   bporch: 12'd20}};

  localparam mode_timing_table_t MODE_TIMINGS = '{
    MODE_1920X1440, MODE_1920X1200, MODE_1920X1080, MODE_1280X720};

  localparam pll_regs_t PLL_SET_DOC = '{
    clk_fb1: 16'd911, clk_fb2: 16'd128, clk_div: 16'd195, clk_out1: 16'd131,
    clk_out2: 16'd128, lock1: 16'd325, lock2: 16'd31745, lock3: 16'd32745,
    filter1: 16'd256, filter2: 16'd2192};

  localparam mode_pll_table_t MODE_PLL = '{PLL_SET_DOC, PLL_SET_DOC, PLL_SET_DOC, PLL_SET_DOC};

  function automatic logic [23:0] adv_place(logic [11:0] chroma, logic [11:0] luma);
    return {chroma[11:4], luma[11:4], chroma[3:0], luma[3:0]};
  endfunction

  function automatic logic [12:0] line_total(axis_timing_t t);
    return 13'(t.active) + 13'(t.fporch) + 13'(t.sync) + 13'(t.bporch);
  endfunction

endpackage

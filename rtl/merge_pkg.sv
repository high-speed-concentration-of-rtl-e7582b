// merge_pkg: types shared by the sorted-stream concentrator.
//
// A sample is a 32-bit packet carrying a timestamp and a measurement (ADC
// value). The 32-bit packet size follows the source design; the split into a
// 16-bit timestamp in the upper half and a 16-bit measurement in the lower
// half is this design's choice. Timestamps compare as unsigned numbers and are
// assumed not to wrap while data are being merged.
//
// Everything between the input FIFOs and the output moves two samples per
// clock, so the common word is pair_t: element 0 is the older sample,
// element 1 the newer one (pair[0].ts <= pair[1].ts).
package merge_pkg;

  localparam int unsigned SAMPLE_W = 32;
  localparam int unsigned TS_W     = 16;
  localparam int unsigned ADC_W    = SAMPLE_W - TS_W;

  typedef logic [TS_W-1:0] ts_t;

  typedef struct packed {
    ts_t              ts;   // timestamp, the sort key
    logic [ADC_W-1:0] adc;  // measurement and any other payload
  } sample_t;

  // Two samples; index 0 is the older one.
  typedef sample_t [1:0] pair_t;

  // What the merger does in a clock where both streams present two samples.
  typedef enum logic [1:0] {
    SEL_A2 = 2'd0,  // AF1 <= BF0: both samples from stream A
    SEL_B2 = 2'd1,  // BF1 <= AF0: both samples from stream B
    SEL_AB = 2'd2,  // one from each, AF0 first
    SEL_BA = 2'd3   // one from each, BF0 first
  } sel_e;

endpackage

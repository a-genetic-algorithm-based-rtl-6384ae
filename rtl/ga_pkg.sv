// ga_pkg: types and constants shared by the genetic-algorithm NoC router blocks.
//
// A chromosome is one 16-bit node data word, as carried on each router port; a
// fitness value is 4 bits wide. Both widths are the document's. The router has
// four direction ports (east, west, north, south) addressed by a 2-bit select
// code; only the code 2'b00 = east is fixed by the published router waveform,
// the order of the other three is this design's choice.
package ga_pkg;

  localparam int unsigned CHROM_W = 16;  // chromosome / node data width
  localparam int unsigned FIT_W   = 4;   // fitness width
  localparam int unsigned N_DIR   = 4;   // router directions

  typedef logic [CHROM_W-1:0] chrom_t;
  typedef logic [FIT_W-1:0]   fit_t;

  typedef enum logic [1:0] {
    DIR_E = 2'b00,
    DIR_W = 2'b01,
    DIR_N = 2'b10,
    DIR_S = 2'b11
  } dir_e;

  // Number of one bits in a chromosome, saturated to the fitness range.
  function automatic fit_t ones_fitness(input chrom_t c);
    int unsigned cnt;
    cnt = 0;
    for (int i = 0; i < CHROM_W; i++) cnt += c[i];
    if (cnt > (2**FIT_W) - 1) cnt = (2**FIT_W) - 1;
    return fit_t'(cnt);
  endfunction

endpackage

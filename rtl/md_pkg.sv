// md_pkg: types and index arithmetic shared by the matched delay sampler and
// generator.
//
// Both structures are N stages long. Because the clock delay per stage (Dc)
// is an integral fraction of the clock period T, several clock edges travel
// down the clock delay line at once and split it into SECTIONS clock sections
// of N/SECTIONS stages each. The continuous ("consecutive data") additions
// treat the stages section by section:
//   * one half of every section goes through a latch on the inverted clock
//     (the upstream half in the sampler, the downstream half in the
//     generator);
//   * every section goes through a clocked FIFO whose depth depends on the
//     section number (SECTIONS-1-k in the sampler, k in the generator).
// The helper functions below give those numbers for a stage or a section.
package md_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Which half of each clock section an out-of-phase latch bank holds.
  typedef enum logic {
    HALF_UPSTREAM   = 1'b0,  // first N/(2*SECTIONS) stages of a section (sampler)
    HALF_DOWNSTREAM = 1'b1   // last  N/(2*SECTIONS) stages of a section (generator)
  } half_e;

  // Direction of the per-section FIFO delays.
  typedef enum logic {
    ORDER_SAMPLER   = 1'b0,  // section k delayed SECTIONS-1-k clocks
    ORDER_GENERATOR = 1'b1   // section k delayed k clocks
  } fifo_order_e;

  // Clock section that stage i belongs to.
  function automatic int unsigned section_of(int unsigned i, int unsigned n,
                                             int unsigned sections);
    return i / (n / sections);
  endfunction

  // True when stage i lies in the requested half of its clock section.
  function automatic bit in_half(int unsigned i, int unsigned n,
                                 int unsigned sections, half_e half);
    int unsigned spc;
    int unsigned pos;
    spc = n / sections;
    pos = i % spc;
    if (half == HALF_UPSTREAM) return pos < spc / 2;
    else                       return pos >= spc / 2;
  endfunction

  // Number of FIFO stages that clock section k passes through.
  function automatic int unsigned fifo_depth(int unsigned k, int unsigned sections,
                                             fifo_order_e order);
    if (order == ORDER_SAMPLER) return sections - 1 - k;
    else                        return k;
  endfunction
endpackage

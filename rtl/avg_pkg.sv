// avg_pkg: types and helpers shared by the moving-average filter.
//
// arch_e selects how lab1_avg forms the sum of the last N samples:
//   ARCH_CHAIN   - shift-register history, linear chain of N-1 adders
//   ARCH_TREE    - shift-register history, balanced adder tree
//   ARCH_RUNNING - shift-register history, registered running sum
//   ARCH_RAM     - circular buffer in a RAM with a pointer, running sum
// The four structures are the ones the filter is built in; the encoding is
// this design's own. sat_add is the saturating (or wrapping) adder used by
// the combinational sum units.
package avg_pkg;

  typedef enum logic [1:0] {
    ARCH_CHAIN   = 2'd0,
    ARCH_TREE    = 2'd1,
    ARCH_RUNNING = 2'd2,
    ARCH_RAM     = 2'd3
  } arch_e;

  // True when n is a power of two (division is then a plain shift).
  function automatic bit is_pow2(input int n);
    return (n > 0) && ((n & (n - 1)) == 0);
  endfunction

  // a + b kept to w bits (w <= 62). With sat set the result clamps to the
  // w-bit two's-complement range, otherwise it wraps like a w-bit adder.
  function automatic longint sat_add(input longint a, input longint b,
                                     input int w, input bit sat);
    longint s, hi, lo, m;
    s  = a + b;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (sat) begin
      if (s > hi) s = hi;
      else if (s < lo) s = lo;
    end else begin
      m = (longint'(1) <<< w) - 1;
      s = s & m;
      if (s > hi) s = s - (longint'(1) <<< w);
    end
    return s;
  endfunction

endpackage

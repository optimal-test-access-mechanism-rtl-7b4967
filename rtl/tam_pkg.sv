// tam_pkg: types shared by the scan-based test access mechanisms.
//
// cell_kind_e names the four kinds of scan register that make up a scan
// chain. Three are wrapper cells around a core, classified by the terminal
// they wrap: a pure driver (wraps a primary input and only feeds test data to
// the core), a pure receiver (wraps a primary output and only captures the
// core's response) and a driver-receiver (wraps a bidirectional terminal and
// does both). The fourth is a flip-flop of one of the core's own internal scan
// chains, which is loaded with stimulus and captures the next state.
//
// wrap_mode_e is the mode of a core test wrapper on a TestRail: functional
// operation, internal test of the core, or bypass, in which the rail passes
// the wrapper by without touching the core.
package tam_pkg;

  typedef enum logic [1:0] {
    CELL_IN    = 2'd0,  // pure driver, wraps a primary input
    CELL_OUT   = 2'd1,  // pure receiver, wraps a primary output
    CELL_BIDIR = 2'd2,  // driver-receiver, wraps a bidirectional terminal
    CELL_INT   = 2'd3   // internal scan flip-flop of the core
  } cell_kind_e;

  typedef enum logic [1:0] {
    WM_NORMAL = 2'd0,
    WM_INTEST = 2'd1,
    WM_BYPASS = 2'd2
  } wrap_mode_e;

  // A register that feeds stimulus must be reached by shift-in.
  function automatic bit drives(cell_kind_e k);
    return k != CELL_OUT;
  endfunction

  // A register that captures a response must be shifted out.
  function automatic bit captures(cell_kind_e k);
    return k != CELL_IN;
  endfunction

  // Width of the cycle counters of the sequencers.
  localparam int unsigned CNT_W = 32;

  // Parameter tables (per-core sizes of the TestRail TAM, per-segment data of
  // the reconfigurable scan chains) are packed arrays of 16-bit fields, entry
  // 0 in the least significant field. A fixed-size type lets a table be
  // overridden together with the count that says how many entries are used.
  // MAX_ENTRIES bounds their length.
  localparam int unsigned MAX_ENTRIES = 256;
  typedef logic [MAX_ENTRIES-1:0][15:0] size_tab_t;

  // Sum of fields first .. first+n-1 of a size table.
  function automatic int tab_sum(size_tab_t t, int first, int n);
    int acc = 0;
    for (int i = first; i < first + n; i++) acc += int'(t[i]);
    return acc;
  endfunction

  // A core wrapper deals n terminals or scan flip-flops of one kind round
  // robin over its w wrapper chains: item i goes to chain i mod w. Number of
  // items chain j receives:
  function automatic int deal(int n, int w, int j);
    return (n + w - 1 - j) / w;
  endfunction

  // Scan-in and scan-out length of a wrapper of width w around a core with
  // n_in inputs, n_ff scan flip-flops and n_out outputs; chain 0 is the
  // longest. Each chain is input cells, then flip-flops, then output cells.
  function automatic int wrap_si(int w, int n_in, int n_ff);
    return deal(n_in, w, 0) + deal(n_ff, w, 0);
  endfunction

  function automatic int wrap_so(int w, int n_ff, int n_out);
    return deal(n_ff, w, 0) + deal(n_out, w, 0);
  endfunction

endpackage

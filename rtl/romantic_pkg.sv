// romantic_pkg: constants and constant functions shared by the QDI ROM.
//
// The ROM's value table is handed to the RTL as parameters in which every
// channel value is one 4-bit digit, so a table line such as "- 0 1" is the
// literal 12'hF01 (F marks a don't-care input). Channel widths are digits too,
// which limits one channel to at most 15 rails.
//
// The tree-sizing functions follow the first-order depth model of the design:
// an OR tree of k inputs has depth ceil(log_sqrt(mp*mn) k) and a C-element tree
// ceil(log_min(mp,mn) k), where mp and mn are the longest permitted pMOS and
// nMOS series stacks (3 and 6 in the reference process). The RTL builds its
// trees with the matching gate fan-ins, floor(sqrt(mp*mn)) for OR gates and
// min(mp,mn) for C-elements. xi_le and xi_hs give the estimated cycle time,
// in CMOS transitions, of the low-energy and high-speed control variants.
package romantic_pkg;

  localparam logic [3:0]  DONT_CARE = 4'hF;  // "-" in an input column
  localparam int          MAX_RAILS = 8;     // default rails per channel vector
  localparam int          SERIES_P  = 3;     // max series pMOS
  localparam int          SERIES_N  = 6;     // max series nMOS

  // Example ROM: the three-input, five-output value table used as the
  // default contents. Input channels a, b, c are 1-of-3, 1-of-4, 1-of-2;
  // output channels are 1-of-2, 1-of-8, 1-of-3, 1-of-2, 1-of-2. Each row is
  // one table line, inputs left to right; the input "1 1 1" is declared never
  // to occur and has no row.
  localparam int EX_N_IN  = 3;
  localparam int EX_N_OUT = 5;
  localparam int EX_ROWS  = 7;
  localparam logic [0:EX_N_IN-1][3:0]  EX_IN_W  = 12'h342;
  localparam logic [0:EX_N_OUT-1][3:0] EX_OUT_W = 20'h28322;
  localparam logic [0:EX_ROWS-1][0:EX_N_IN-1][3:0] EX_IN_VAL = {
    12'hF01,   // - 0 1
    12'hF00,   // - 0 0
    12'h011,   // 0 1 1
    12'h211,   // 2 1 1
    12'hF10,   // - 1 0
    12'hF2F,   // - 2 -
    12'hF3F    // - 3 -
  };
  localparam logic [0:EX_ROWS-1][0:EX_N_OUT-1][3:0] EX_OUT_VAL = {
    20'h11100,
    20'h12201,
    20'h11101,
    20'h11110,
    20'h11111,
    20'h11110,
    20'h11111
  };

  // ceil(log_b(k)) for k >= 1, b >= 2
  function automatic int clog(input int k, input int b);
    int d = 0;
    int reach = 1;
    while (reach < k) begin
      reach = reach * b;
      d++;
    end
    return d;
  endfunction

  function automatic int isqrt(input int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int or_fanin(input int mp, input int mn);
    return isqrt(mp * mn);
  endfunction

  function automatic int c_fanin(input int mp, input int mn);
    return (mp < mn) ? mp : mn;
  endfunction

  // Depth of an OR tree (Delta_V) and of a C tree (Delta_C) over k inputs.
  function automatic int delta_v(input int k, input int mp, input int mn);
    return clog(k, or_fanin(mp, mn));
  endfunction

  function automatic int delta_c(input int k, input int mp, input int mn);
    return clog(k, c_fanin(mp, mn));
  endfunction

  function automatic int max2(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Estimated cycle times in transitions from the tree depths
  // di (inputs), dd (decode), de (output enables), d_o (outputs).
  function automatic int xi_le(input int di, input int dd, input int de, input int d_o);
    return 19 + max2(max2(di, d_o + 4), max2(dd + 2, de + 5)) + di + dd + max2(d_o, de);
  endfunction

  function automatic int xi_hs(input int di, input int dd, input int de, input int d_o);
    return max2(max2(max2(2 * d_o + 9, de + d_o + 10), max2(di + dd + 5, 2 * dd + 9)),
                max2(dd + d_o + 9, 2 * di + 1));
  endfunction

endpackage

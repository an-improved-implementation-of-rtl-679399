// mult_pkg: constants and helper functions shared by the adders and the
// hierarchy multiplier.
//
// adder_kind_e names the three carry select adders the multiplier can use
// for its final addition. The group functions describe how a carry select
// adder of a given width is split into groups: 2, 2, 3, 4, 5 bits for a
// 16-bit adder (least significant group first), continued with groups of
// 6, 7, ... bits for wider adders, the last group cut to the width left.
// The 16-bit split is the published BEC carry select adder's; the
// continuation past 16 bits is this design's choice.
package mult_pkg;

  typedef enum logic [1:0] {
    CSLA_CONV = 2'd0,  // dual-RCA carry select adder
    CSLA_BEC  = 2'd1,  // RCA + binary-to-excess-1 converter
    CSLA_MP   = 2'd2   // half-sum / dual carry generator / carry select
  } adder_kind_e;

  // Nominal size of group k before cutting to fit.
  function automatic int grp_size(input int k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Bit position of the least significant bit of group k.
  function automatic int grp_lsb(input int k);
    int lsb;
    lsb = 0;
    for (int j = 0; j < k; j++) lsb += grp_size(j);
    return lsb;
  endfunction

  // Number of groups needed to cover w bits.
  function automatic int num_groups(input int w);
    int k;
    k = 0;
    while (grp_lsb(k) < w) k++;
    return k;
  endfunction

  // Width of group k in an adder of w bits.
  function automatic int grp_width(input int w, input int k);
    int rest;
    rest = w - grp_lsb(k);
    return (grp_size(k) < rest) ? grp_size(k) : rest;
  endfunction

endpackage

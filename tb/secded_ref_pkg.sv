// secded_ref_pkg - testbench reference model of the 16-bit SEC-DED code.
//
// Written independently of the RTL: the data bits go to the fixed list of
// non-power-of-two positions 3,5,6,7,9..15,17..21; the check bits are then
// chosen so that the XOR of the indices of all set positions is zero (which
// sets check bit 2**j exactly when bit j of that XOR is one); bit 0 makes the
// total number of ones even.
package secded_ref_pkg;

  localparam int REF_DATA_W = 16;
  localparam int REF_CODE_W = 22;

  localparam int DPOS [REF_DATA_W] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15,
                                       17, 18, 19, 20, 21};

  function automatic logic [REF_CODE_W-1:0] ref_encode(input logic [REF_DATA_W-1:0] d);
    logic [REF_CODE_W-1:0] c;
    int                    s;
    c = '0;
    s = 0;
    for (int i = 0; i < REF_DATA_W; i++) begin
      c[DPOS[i]] = d[i];
      if (d[i]) s ^= DPOS[i];
    end
    c[1]  = s[0];
    c[2]  = s[1];
    c[4]  = s[2];
    c[8]  = s[3];
    c[16] = s[4];
    c[0]  = ^c[REF_CODE_W-1:1];
    return c;
  endfunction

  function automatic logic [REF_DATA_W-1:0] ref_extract(input logic [REF_CODE_W-1:0] c);
    logic [REF_DATA_W-1:0] d;
    for (int i = 0; i < REF_DATA_W; i++) d[i] = c[DPOS[i]];
    return d;
  endfunction

endpackage

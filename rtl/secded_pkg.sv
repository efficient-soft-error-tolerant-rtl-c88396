// secded_pkg: Hamming (39,32) single-error-correcting, double-error-detecting
// code for 32-bit memory words (6 Hamming check bits plus one overall parity
// bit, the usual 7 check bits for a 32-bit word).
//
// Codeword layout: bit cw[i-1] holds Hamming position i for i = 1..38. Check
// bits sit at the power-of-two positions 1, 2, 4, 8, 16, 32; data bits fill the
// other positions in increasing order (data[0] at position 3). cw[38] is the
// parity of cw[37:0], making the whole codeword even.
// Decoding: the syndrome is the XOR of the positions of all set bits, zero for
// a clean word. With odd overall parity there is one error, at the position
// the syndrome names (or in cw[38] when the syndrome is zero); with even
// overall parity and a non-zero syndrome there are two errors, which cannot be
// corrected.
package secded_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned CW_W   = 39;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CW_W-1:0]   cw_t;

  typedef struct packed {
    data_t data;       // corrected data
    cw_t   cw;         // corrected codeword, for writing back
    logic  sec;        // a single error was found and corrected
    logic  ded;        // two errors: data is not trustworthy
  } dec_t;

  function automatic logic is_check_pos(int unsigned pos);
    return (pos & (pos - 1)) == 0;
  endfunction

  function automatic logic [5:0] syndrome(cw_t cw);
    logic [5:0] s = '0;
    for (int unsigned pos = 1; pos <= 38; pos++)
      if (cw[pos-1]) s ^= 6'(pos);
    return s;
  endfunction

  function automatic data_t extract(cw_t cw);
    data_t d = '0;
    int unsigned k = 0;
    for (int unsigned pos = 1; pos <= 38; pos++)
      if (!is_check_pos(pos)) begin
        d[k] = cw[pos-1];
        k++;
      end
    return d;
  endfunction

  function automatic cw_t encode(data_t d);
    cw_t        cw = '0;
    logic [5:0] s;
    int unsigned k = 0;
    for (int unsigned pos = 1; pos <= 38; pos++)
      if (!is_check_pos(pos)) begin
        cw[pos-1] = d[k];
        k++;
      end
    s = syndrome(cw);
    for (int unsigned b = 0; b < 6; b++) cw[(1 << b) - 1] = s[b];
    cw[38] = ^cw[37:0];
    return cw;
  endfunction

  function automatic dec_t decode(cw_t cw);
    dec_t       r;
    logic [5:0] s   = syndrome(cw);
    logic       odd = ^cw;
    r.cw  = cw;
    r.sec = 1'b0;
    r.ded = 1'b0;
    if (odd) begin
      if (s == 6'd0)       r.cw[38]  = ~cw[38];
      else if (s <= 6'd38) r.cw[s-1] = ~cw[s-1];
      if (s <= 6'd38) r.sec = 1'b1;
      else            r.ded = 1'b1;   // points outside the word: not one error
    end else if (s != 6'd0) begin
      r.ded = 1'b1;
    end
    r.data = extract(r.cw);
    return r;
  endfunction
endpackage

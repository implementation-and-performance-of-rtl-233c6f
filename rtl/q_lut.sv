// q_lut: look-up table of the observation quantisation step q for the
// log-MAP decoder.
//
// With the packet normalised so that its largest magnitude maps to NormMax,
// the step that keeps a symbol within mean + 3 sigma of the channel value is
//     q = (2Es/N0 + 3*sqrt(2Es/N0)) / NormMax.
// The table is indexed by NormMax (1..31) and by the symbol SNR Es/N0 in dB,
// SNR_MIN_DB + 0.25 dB * snr_idx, and returns q as an 8-bit word with 3
// integer and 5 fractional bits (rounded to nearest, limited to 1/32 .. 255/32).
// The q value selects the max* correction table (maxstar). All entries are
// computed at elaboration from the formula; the lookup is combinational.
// The formula and the 3.5 format follow the published design; the SNR grid
// and the indexing by NormMax are this design's choices.
module q_lut #(
  parameter real SNR_MIN_DB = -10.0
) (
  input  logic [4:0] norm_max,
  input  logic [5:0] snr_idx,
  output logic [7:0] q_code
);

  function automatic logic [7:0] q_entry(int nm, int si);
    real esn0, g, q;
    int  c;
    if (nm == 0) nm = 1;
    esn0 = 10.0 ** ((SNR_MIN_DB + 0.25 * real'(si)) / 10.0);
    g    = 2.0 * esn0;
    q    = (g + 3.0 * $sqrt(g)) / real'(nm);
    c    = int'($floor(q * 32.0 + 0.5));
    if (c < 1)   c = 1;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  logic [7:0] tab [32][64];
  for (genvar gn = 0; gn < 32; gn++) begin : g_nm
    for (genvar gs = 0; gs < 64; gs++) begin : g_snr
      localparam logic [7:0] E = q_entry(gn, gs);
      assign tab[gn][gs] = E;
    end
  end

  assign q_code = tab[norm_max][snr_idx];

endmodule

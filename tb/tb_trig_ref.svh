// Reference model of the sector trigger used by the trigger testbenches.
// Written independently of the RTL: candidates are ranked by a single score
// (valid, threshold, inverted PAD number) and picked by sorting.

// eta-overlap removal: in each adjacent pair with both flagged, drop the
// lower threshold, or the higher PAD number on equal thresholds
function automatic void ref_overlap(input sl_pkg::pad_cand_t in [8], output sl_pkg::cand_t out [8]);
  bit keep [8];
  foreach (keep[i]) keep[i] = in[i].valid;
  for (int i = 0; i < 7; i++)
    if (in[i].valid && in[i+1].valid && in[i].ovl_eta && in[i+1].ovl_eta) begin
      if (int'(in[i+1].thr) > int'(in[i].thr)) keep[i] = 0; else keep[i+1] = 0;
    end
  foreach (out[i]) begin
    out[i].valid   = keep[i];
    out[i].ovl_phi = in[i].ovl_phi;
    out[i].hit_opl = in[i].hit_opl;
    out[i].thr     = in[i].thr;
    out[i].roi     = in[i].roi;
  end
endfunction

function automatic int score(input sl_pkg::cand_t c, input int pad);
  return c.valid ? (int'(c.thr) * 16 + (15 - pad) + 1000) : -1;
endfunction

// best candidate of the array, skipping PAD 'skip' (-1: none)
function automatic sl_pkg::sel_cand_t ref_best(input sl_pkg::cand_t c [8], input int skip);
  int best = -1, bs = -1;
  sl_pkg::sel_cand_t r;
  for (int i = 0; i < 8; i++)
    if (i != skip && score(c[i], i) > bs) begin bs = score(c[i], i); best = i; end
  r = '0;
  if (best >= 0 && c[best].valid) begin r.c = c[best]; r.pad = 3'(best); end
  return r;
endfunction

function automatic int ref_count(input sl_pkg::cand_t c [8]);
  int n = 0;
  foreach (c[i]) if (c[i].valid) n++;
  return n;
endfunction

// row_buffer_tags: hit detection and replacement for the multi-entry row
// buffer of one bank.
//
// The row buffer of a bank holds ENTRIES entries of 256 B (one 2048-bit array
// row segment across the rank), separate from the sense amplifiers. It is
// write-through: a write updates the array and the matching entry together,
// so an entry is never dirty and never needs writing back. This block keeps
// only the tags: NLOOK lookup ports answer "is this line a row hit now" for
// every bank-queue entry at once, and one update port records an access
// (reads and writes both allocate; the least recently used entry is
// replaced). The entry count and write-through policy are the document's;
// LRU replacement and allocation on write misses are this design's choices.
// Lookups are combinational; an update takes effect at the next clock edge.
module row_buffer_tags #(
  parameter int ENTRIES = pcm_pkg::RB_ENTRIES,
  parameter int NLOOK   = 16,
  parameter int TAG_W   = pcm_pkg::TAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [TAG_W-1:0] look_tag [NLOOK],
  output logic [NLOOK-1:0] look_hit,
  input  logic             upd_en,
  input  logic [TAG_W-1:0] upd_tag
);
  localparam int AW = $clog2(ENTRIES);
  logic [TAG_W-1:0] tag   [ENTRIES];
  logic             vld   [ENTRIES];
  logic [AW-1:0]    age   [ENTRIES];   // 0 = most recently used
  logic [AW-1:0]    vict, hit_idx, use_idx, use_age;
  logic             upd_hit;

  always_comb begin
    for (int l = 0; l < NLOOK; l++) begin
      look_hit[l] = 1'b0;
      for (int e = 0; e < ENTRIES; e++)
        if (vld[e] && tag[e] == look_tag[l]) look_hit[l] = 1'b1;
    end
  end

  always_comb begin
    upd_hit = 1'b0; hit_idx = '0; vict = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[e] && tag[e] == upd_tag) begin upd_hit = 1'b1; hit_idx = AW'(e); end
    // victim: an invalid entry if any, else the oldest one
    for (int e = 0; e < ENTRIES; e++)
      if (age[e] == AW'(ENTRIES-1)) vict = AW'(e);
    for (int e = ENTRIES-1; e >= 0; e--)
      if (!vld[e]) vict = AW'(e);
    use_idx = upd_hit ? hit_idx : vict;
    use_age = age[use_idx];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        vld[e] <= 1'b0; tag[e] <= '0; age[e] <= AW'(e);
      end
    end else if (upd_en) begin
      for (int e = 0; e < ENTRIES; e++)
        if (AW'(e) == use_idx) age[e] <= '0;
        else if (age[e] < use_age) age[e] <= age[e] + 1'b1;
      vld[use_idx] <= 1'b1;
      tag[use_idx] <= upd_tag;
    end
endmodule

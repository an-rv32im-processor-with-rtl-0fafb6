// btb: branch target buffer of the FLBPU.
//
// ENTRIES (64) fully associative entries, each a valid bit, the full branch
// PC as tag and the target. A lookup is combinational: every entry compares
// its tag with lookup_pc and a hit returns the cached target in the same
// cycle. Replacement is true LRU: each entry keeps an age (0 = most recently
// used) and the ages always form a permutation of 0..ENTRIES-1. A lookup hit
// or an update makes the entry the most recent on the next clock edge and
// ages the entries that were younger. An update to a PC already present
// rewrites its target; otherwise it fills the first empty entry, or, when
// all are full, the oldest one. Statistics (lookups, hits, updates, empty
// entries) are 16-bit counters. 64 entries and LRU replacement are the
// document's; full associativity and the age-matrix form are this design's
// own choices. An update has priority over a lookup for the LRU touch.
module btb #(
  parameter int ENTRIES = 64,
  parameter int XLEN_P  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lookup_valid,
  input  logic [XLEN_P-1:0] lookup_pc,
  output logic              hit,
  output logic [XLEN_P-1:0] predicted_target,
  output logic [$clog2(ENTRIES)-1:0] lookup_index,
  input  logic              update_enable,
  input  logic [XLEN_P-1:0] update_pc,
  input  logic [XLEN_P-1:0] update_target,
  output logic [$clog2(ENTRIES)-1:0] replace_index,
  output logic [15:0]       lookup_count,
  output logic [15:0]       hit_count,
  output logic [15:0]       update_count,
  output logic [15:0]       invalid_entry_count
);
  localparam int IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  logic [XLEN_P-1:0]  tag_q    [ENTRIES];
  logic [XLEN_P-1:0]  target_q [ENTRIES];
  logic [IW-1:0]      age_q    [ENTRIES];

  logic          upd_hit, have_free;
  logic [IW-1:0] upd_idx, free_idx, lru_idx, victim;
  logic          touch;
  logic [IW-1:0] touch_idx;

  always_comb begin
    hit = 1'b0; lookup_index = '0;
    upd_hit = 1'b0; upd_idx = '0;
    have_free = 1'b0; free_idx = '0;
    lru_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && tag_q[i] == lookup_pc) begin hit = 1'b1; lookup_index = IW'(i); end
      if (valid_q[i] && tag_q[i] == update_pc) begin upd_hit = 1'b1; upd_idx = IW'(i); end
      if (!valid_q[i]) begin have_free = 1'b1; free_idx = IW'(i); end
      if (age_q[i] == IW'(ENTRIES - 1)) lru_idx = IW'(i);
    end
    hit = hit && lookup_valid;
    predicted_target = hit ? target_q[lookup_index] : '0;
    victim = upd_hit ? upd_idx : (have_free ? free_idx : lru_idx);
    replace_index = victim;
    touch     = update_enable || hit;
    touch_idx = update_enable ? victim : lookup_index;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        age_q[i]    <= IW'(i);
        tag_q[i]    <= '0;
        target_q[i] <= '0;
      end
      lookup_count <= '0; hit_count <= '0; update_count <= '0;
      invalid_entry_count <= 16'(ENTRIES);
    end else begin
      if (lookup_valid) lookup_count <= lookup_count + 16'd1;
      if (hit)          hit_count    <= hit_count + 16'd1;
      if (update_enable) begin
        update_count     <= update_count + 16'd1;
        valid_q[victim]  <= 1'b1;
        tag_q[victim]    <= update_pc;
        target_q[victim] <= update_target;
        if (!upd_hit && have_free) invalid_entry_count <= invalid_entry_count - 16'd1;
      end
      if (touch) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (IW'(i) == touch_idx)            age_q[i] <= '0;
          else if (age_q[i] < age_q[touch_idx]) age_q[i] <= age_q[i] + IW'(1);
        end
      end
    end
  end
endmodule

// fise_tcam: ternary CAM holding one FISE prefix table (destination or source).
//
// Each entry is a value, a care-mask (1 = bit is compared) and a valid bit. A
// lookup compares the key against every valid entry in parallel and returns
// the lowest matching address. Priority by address is how a TCAM resolves
// multiple matches; the control plane keeps longer prefixes at lower
// addresses (prefixes of one length clustered together, as in the
// L-algorithm layout), so the first match is the longest-matching prefix.
// The matched address then addresses the TCAM-associated index SRAM.
//
// Timing: the lookup is registered. Key presented with lookup_en in cycle t,
// hit/match_addr valid (res_valid) in cycle t+1. A write (we) updates the
// entry at the clock edge; a lookup in the same cycle sees the old contents.
// The caller must not look up while it writes: a TCAM update interrupts the
// lookup, which is the behaviour the design accepts for TCAM updates.
// Reset clears every valid bit; values and masks are not reset.
module fise_tcam #(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lookup_en,
  input  logic [KEY_W-1:0]  key,
  output logic              res_valid,
  output logic              hit,
  output logic [ADDR_W-1:0] match_addr,
  // entry write
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [KEY_W-1:0]  wvalue,
  input  logic [KEY_W-1:0]  wmask,
  input  logic              wentry_valid
);

  logic [KEY_W-1:0] value_q [DEPTH];
  logic [KEY_W-1:0] mask_q  [DEPTH];
  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (we) begin
      value_q[waddr] <= wvalue;
      mask_q[waddr]  <= wmask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (we) valid_q[waddr] <= wentry_valid;
  end

  // Match lines and priority encoder (lowest address wins).
  logic [DEPTH-1:0]  match_line;
  logic              any_match;
  logic [ADDR_W-1:0] prio_addr;

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      match_line[i] = valid_q[i] && (((key ^ value_q[i]) & mask_q[i]) == '0);
    end
  end

  always_comb begin
    any_match   = 1'b0;
    prio_addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match_line[i]) begin
        any_match   = 1'b1;
        prio_addr = ADDR_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid  <= 1'b0;
      hit        <= 1'b0;
      match_addr <= '0;
    end else begin
      res_valid  <= lookup_en;
      if (lookup_en) begin
        hit        <= any_match;
        match_addr <= prio_addr;
      end
    end
  end

endmodule

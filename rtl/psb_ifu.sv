// psb_ifu: instruction fetch unit with path-selection branching.
//
// The IFU fetches one instruction-memory row per cycle (one instruction per
// PE). It walks the program sequentially from `cfg_start`, wrapping from
// `cfg_loop_end` back to `cfg_loop_start`, and stops after `cfg_cycles`
// rows; since both paths of a conditional are K cycles long, the total
// number of cycles of a loop does not depend on the branch outcomes.
//
// Path selection: the designated PE registers the outcome and path length
// K of a branch operation at the end of the branch cycle, so `br` is valid
// while the delay slot (the row after the branch) executes. In that cycle
// the IFU chooses the next fetch address. The conditional region starts at
// `base` and holds the else-path (K rows) followed by the if-path (K rows):
//   - outcome false: fetch base .. base+K-1, then skip to base+2K;
//   - outcome true : skip to base+K, fetch K rows, then continue at base+2K.
// Two region placements are supported, selected by `cfg_modulo`:
//   - cfg_modulo = 0: the region begins right after the delay slot (the
//     arrangement of the design's non-pipelined example);
//   - cfg_modulo = 1: the loop body itself is the region, holding an
//     else-version and an if-version of a modulo-scheduled kernel, each K
//     rows long, and each branch picks the version of the next kernel pass
//     (the design's modulo-scheduled example). Then base = cfg_loop_start.
// The selection rule itself follows the design. The two placements, the
// configuration registers, the cycle budget and the event outputs are
// choices of this implementation. A branch arriving while a path is being
// issued starts a new region (this is how the modulo kernel chains passes).
// A branch with K = 0 is ignored. Addresses that run past the loop end wrap
// into the loop once.
module psb_ifu
  import psb_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_DEPTH,
  parameter int unsigned CW    = 16,     // width of the cycle budget
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,          // pulse: begin issuing
  input  logic [AW-1:0] cfg_start,
  input  logic [AW-1:0] cfg_loop_start,
  input  logic [AW-1:0] cfg_loop_end,
  input  logic          cfg_modulo,
  input  logic [CW-1:0] cfg_cycles,     // rows to issue
  input  br_info_t      br,             // from the designated PE
  output logic          fetch_re,
  output logic [AW-1:0] fetch_addr,
  output logic          busy,
  output logic          done,
  // one-cycle event pulses, for observation
  output logic          ev_taken,       // branch outcome true consumed
  output logic          ev_not_taken,   // branch outcome false consumed
  output logic          ev_skip,        // jump over the unused path
  output logic          ev_wrap         // sequential wrap to the loop start
);

  localparam int unsigned XW = AW + K_W + 2;

  logic [CW-1:0]  remaining;
  logic [AW-1:0]  last_addr;
  logic           last_valid;
  logic           path_active, path_taken;
  logic [K_W-1:0] path_cnt;
  logic [AW-1:0]  path_exit;

  logic [AW-1:0]  seq, base;
  logic           new_branch;

  // base + n, wrapped once into the loop when base lies inside it.
  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] b, logic [XW-1:0] n);
    logic [XW-1:0] x, len;
    x   = XW'(b) + n;
    len = XW'(cfg_loop_end) - XW'(cfg_loop_start) + XW'(1);
    if (b >= cfg_loop_start && b <= cfg_loop_end && x > XW'(cfg_loop_end))
      x = x - len;
    return x[AW-1:0];
  endfunction

  assign busy       = (remaining != '0);
  assign fetch_re   = busy;
  assign new_branch = last_valid && br.valid && (br.k != '0);
  assign seq        = (last_addr == cfg_loop_end) ? cfg_loop_start : last_addr + AW'(1);
  assign base       = cfg_modulo ? cfg_loop_start : seq;

  always_comb begin
    ev_taken     = 1'b0;
    ev_not_taken = 1'b0;
    ev_skip      = 1'b0;
    ev_wrap      = 1'b0;
    if (!last_valid) begin
      fetch_addr = cfg_start;
    end else if (new_branch) begin
      ev_taken     = fetch_re && br.taken;
      ev_not_taken = fetch_re && !br.taken;
      ev_skip      = fetch_re && br.taken;
      fetch_addr   = br.taken ? wrap_add(base, XW'(br.k)) : base;
    end else if (path_active && path_cnt == '0 && !path_taken) begin
      fetch_addr = path_exit;
      ev_skip    = fetch_re;
    end else begin
      fetch_addr = seq;
      ev_wrap    = fetch_re && (last_addr == cfg_loop_end);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining   <= '0;
      last_addr   <= '0;
      last_valid  <= 1'b0;
      path_active <= 1'b0;
      path_taken  <= 1'b0;
      path_cnt    <= '0;
      path_exit   <= '0;
      done        <= 1'b0;
    end else if (start && !busy) begin
      remaining   <= cfg_cycles;
      last_valid  <= 1'b0;
      path_active <= 1'b0;
      done        <= 1'b0;
    end else if (busy) begin
      remaining  <= remaining - CW'(1);
      last_addr  <= fetch_addr;
      last_valid <= 1'b1;
      if (remaining == CW'(1)) done <= 1'b1;
      if (new_branch) begin
        path_active <= 1'b1;
        path_taken  <= br.taken;
        path_cnt    <= br.k - K_W'(1);
        path_exit   <= wrap_add(base, XW'(br.k) << 1);
      end else if (path_active) begin
        if (path_cnt == '0) path_active <= 1'b0;
        else                path_cnt    <= path_cnt - K_W'(1);
      end
    end else begin
      last_valid <= 1'b0;
    end
  end

  // The cycle budget may only be loaded while idle.
  always_ff @(posedge clk) begin
    if (rst_n && start) assert (!busy) else $error("psb_ifu: start while busy");
  end

endmodule

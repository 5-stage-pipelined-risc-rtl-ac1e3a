// branch_predictor: branch history table (BHT) with 2-bit counters.
// ENTRIES entries (16 in the source), direct-mapped by instruction address
// bits [IDX+1:2]. Each entry holds a valid bit, the full address of a branch
// or JAL instruction, its target address and a 2-bit saturating counter
// (3 strongly taken, 2 weakly taken, 1 weakly not taken, 0 strongly not
// taken). Lookup (fetch stage, combinational): if pc_f matches a stored
// address, predict_taken is the counter's upper bit and predict_target the
// stored target. Update (execute stage, at the clock edge when upd_en is
// high): a recorded instruction moves its counter one step towards the
// outcome; an unrecorded one is written into its slot with the counter at
// weakly taken. JALR is never recorded.
// From the source: 16 entries, direct mapping on the address, stored
// address and target, 2-bit states, entry into weakly taken, the state
// transitions, and no JALR. This design's choices: an instruction is recorded
// only the first time it is taken (an untaken branch that is not in the table
// keeps being predicted not taken), the full 32-bit address is the tag, and
// the table resets to empty.
module branch_predictor #(
  parameter int unsigned ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst,
  // fetch-stage lookup
  input  logic [31:0] pc_f,
  output logic        predict_taken,
  output logic [31:0] predict_target,
  // execute-stage update
  input  logic        upd_en,       // instruction in execute advances this cycle
  input  logic [31:0] pc_e,
  input  logic        branch_e,     // conditional branch
  input  logic        jump_e,       // JAL
  input  logic        taken_e,      // actual outcome
  input  logic [31:0] target_e      // actual target when taken
);
  localparam int unsigned IDX = $clog2(ENTRIES);

  typedef struct packed {
    logic        valid;
    logic [31:0] addr;
    logic [31:0] target;
    logic [1:0]  state;
  } bht_entry_t;

  localparam logic [1:0] ST_STRONG_T  = 2'b11;
  localparam logic [1:0] ST_WEAK_T    = 2'b10;

  bht_entry_t table_q [ENTRIES];

  logic [IDX-1:0] idx_f, idx_e;
  bht_entry_t     ent_f, ent_e;
  logic           hit_e;

  assign idx_f = pc_f[IDX+1:2];
  assign idx_e = pc_e[IDX+1:2];
  assign ent_f = table_q[idx_f];
  assign ent_e = table_q[idx_e];
  assign hit_e = ent_e.valid && ent_e.addr == pc_e;

  assign predict_taken  = ent_f.valid && ent_f.addr == pc_f && ent_f.state[1];
  assign predict_target = ent_f.target;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else if (upd_en && (branch_e || jump_e)) begin
      if (hit_e) begin
        if (taken_e && ent_e.state != ST_STRONG_T)
          table_q[idx_e].state <= ent_e.state + 2'd1;
        else if (!taken_e && ent_e.state != 2'b00)
          table_q[idx_e].state <= ent_e.state - 2'd1;
      end else if (taken_e) begin
        table_q[idx_e] <= '{valid: 1'b1, addr: pc_e, target: target_e, state: ST_WEAK_T};
      end
    end
  end
endmodule

// secx_cam: small content-addressable memory of a meter.  Each entry holds a
// key (job-id or req-id) and a data word (start time and tags).  `ins`
// writes key/data into the lowest free entry and returns its index in the
// same cycle (ins_idx, ins_ok); each of the NSRCH search keys is compared
// against all valid entries at once and gives hit, index and data
// combinationally; `del` frees an entry by index.  An insert and a delete
// may happen in the same cycle.  The entry count is T for the task CAM and
// max_n_req for the request CAM.  Lowest-free allocation and the number of
// search ports are this design's choices.
module secx_cam #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned KEY_W   = 8,
  parameter int unsigned DATA_W  = 64,
  parameter int unsigned NSRCH   = 1,
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ins,
  input  logic [KEY_W-1:0]   ins_key,
  input  logic [DATA_W-1:0]  ins_data,
  output logic               ins_ok,
  output logic [IW-1:0]      ins_idx,
  input  logic [KEY_W-1:0]   srch_key  [NSRCH],
  output logic               hit       [NSRCH],
  output logic [IW-1:0]      hit_idx   [NSRCH],
  output logic [DATA_W-1:0]  hit_data  [NSRCH],
  input  logic               del,
  input  logic [IW-1:0]      del_idx,
  output logic               full
);
  logic [ENTRIES-1:0] valid;
  logic [KEY_W-1:0]   keys  [ENTRIES];
  logic [DATA_W-1:0]  datas [ENTRIES];

  always_comb begin
    ins_ok  = 1'b0;
    ins_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin
        ins_ok  = 1'b1;
        ins_idx = IW'(i);
      end
    for (int s = 0; s < NSRCH; s++) begin
      hit[s]      = 1'b0;
      hit_idx[s]  = '0;
      hit_data[s] = '0;
      for (int i = ENTRIES - 1; i >= 0; i--)
        if (valid[i] && keys[i] == srch_key[s]) begin
          hit[s]      = 1'b1;
          hit_idx[s]  = IW'(i);
          hit_data[s] = datas[i];
        end
    end
  end
  assign full = &valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid <= '0;
    else begin
      if (del) valid[del_idx] <= 1'b0;
      if (ins && ins_ok) valid[ins_idx] <= 1'b1;
    end

  always_ff @(posedge clk)
    if (ins && ins_ok) begin
      keys[ins_idx]  <= ins_key;
      datas[ins_idx] <= ins_data;
    end
endmodule

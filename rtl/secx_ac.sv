// secx_ac: the Auditor-Comptroller, the central part of SecX that receives,
// validates, stores and serves the job logs of all meters.
//
// A log arrives as LOG_WORDS 64-bit words (most significant first, see
// secx_pkg) into the log-processing buffer.  The AC recomputes the
// HMAC-SHA256 of the 546-byte body with the key shared by all auditor
// hardware and compares it with the checksum carried in the log.  A log
// whose signature matches is copied, one word per cycle, into the
// non-volatile store at the next of NJA slots (the store is circular: when
// it is full the oldest log is overwritten and `overflows` counts it).  A log
// with a bad signature, or with `last` on the wrong word, is discarded and
// counted in `rejected`.  Logs are served by slot and word (rd_*), with the
// data one cycle after rd_en.  log_ready is high only while receiving.
// Following the SecX paper: validation by HMAC, local non-volatile storage,
// serving logs.  Left out: the periodic RSA-encrypted export to host storage
// and the upload to the auditor's servers.
module secx_ac
  import secx_pkg::*;
#(
  parameter int unsigned NJA = 7000,
  localparam int unsigned SW = $clog2(NJA),
  localparam int unsigned AW = $clog2(NJA * LOG_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          log_key_we,
  input  logic [255:0]  log_key_in,
  input  logic          log_valid,
  output logic          log_ready,
  input  logic [63:0]   log_data,
  input  logic          log_last,
  input  logic          rd_en,
  input  logic [SW-1:0] rd_slot,
  input  logic [6:0]    rd_word,
  output logic [63:0]   rd_data,
  output logic [31:0]   stored,
  output logic [31:0]   rejected,
  output logic [31:0]   overflows,
  output logic [SW-1:0] wr_slot
);
  typedef enum logic [2:0] {A_RX, A_CHK, A_WAIT, A_ST} st_e;
  st_e st;

  logic [255:0] key;
  log_flat_t    buf_q;
  logic [6:0]   widx;
  logic [31:0]  nvalid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          key <= '0;
    else if (log_key_we) key <= log_key_in;

  logic         hm_busy, hm_done;
  logic [255:0] hm_mac, rx_mac;
  log_body_t    body;
  assign body   = log_body_t'(buf_q[LOG_WORDS*64-1 -: LOG_BODY_BYTES*8]);
  assign rx_mac = buf_q[LOG_WORDS*64-1-LOG_BODY_BYTES*8 -: 256];

  secx_hmac_sha256 #(.MSG_BYTES(LOG_BODY_BYTES)) u_hmac (
    .clk, .rst_n, .start(st == A_CHK), .key, .msg(body),
    .busy(hm_busy), .done(hm_done), .mac(hm_mac)
  );

  logic          nv_we;
  logic [AW-1:0] nv_waddr, nv_raddr;
  assign nv_we    = (st == A_ST);
  assign nv_waddr = AW'(wr_slot) * AW'(LOG_WORDS) + AW'(widx);
  assign nv_raddr = AW'(rd_slot) * AW'(LOG_WORDS) + AW'(rd_word);

  secx_log_nvm #(.NJA(NJA), .LOG_WORDS(LOG_WORDS)) u_nvm (
    .clk, .we(nv_we), .waddr(nv_waddr), .wdata(buf_q[LOG_WORDS*64-1 - 64*widx -: 64]),
    .re(rd_en), .raddr(nv_raddr), .rdata(rd_data)
  );

  assign log_ready = (st == A_RX);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= A_RX; buf_q <= '0; widx <= '0; stored <= '0; rejected <= '0;
      overflows <= '0; wr_slot <= '0; nvalid <= '0;
    end else begin
      unique case (st)
        A_RX: if (log_valid) begin
          buf_q[LOG_WORDS*64-1 - 64*widx -: 64] <= log_data;
          if (log_last) begin
            widx <= '0;
            if (widx == 7'(LOG_WORDS - 1)) st <= A_CHK;
            else if (widx != 7'd127)       rejected <= rejected + 1'b1;
          end else if (widx == 7'(LOG_WORDS - 1)) begin
            // over-long log: keep discarding until its last word
            rejected <= rejected + 1'b1;
            widx     <= 7'd127;
          end else if (widx != 7'd127) begin
            widx <= widx + 1'b1;
          end
        end
        A_CHK: st <= A_WAIT;
        A_WAIT: if (hm_done) begin
          if (hm_mac == rx_mac) st <= A_ST;
          else begin
            rejected <= rejected + 1'b1;
            st       <= A_RX;
          end
        end
        A_ST: begin
          if (widx == 7'(LOG_WORDS - 1)) begin
            widx    <= '0;
            stored  <= stored + 1'b1;
            wr_slot <= (wr_slot == SW'(NJA - 1)) ? '0 : wr_slot + 1'b1;
            if (nvalid == 32'(NJA)) overflows <= overflows + 1'b1;
            else                    nvalid    <= nvalid + 1'b1;
            st <= A_RX;
          end else widx <= widx + 1'b1;
        end
        default: st <= A_RX;
      endcase
    end

  logic unused;
  assign unused = hm_busy;
endmodule

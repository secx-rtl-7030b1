// secx_pkg: widths, message formats and the job-log layout shared by the
// SecX meters, gateway and Auditor-Comptroller.
//
// The log layout follows the SecX paper's log table field by field (timestamp
// 16 B, job-id 8 B, guest-id 1 B, job-type 1 B, QoS latency and throughput
// 4 B each, QoE 256 B = R x nbins x 4 B with R = 4 and nbins = 16, HoI 128 B,
// HoO 128 B, SHA-256 checksum 32 B: 578 B in all).  The message formats
// follow the guest resource request protocol: a request digest encrypts
// job_id || req_id || resource_id || time || nonce, a response digest
// req_id || time || nonce.  The widths of req_id, resource_id, addresses and
// data are this design's own choice; the SecX paper does not give them.
package secx_pkg;

  localparam int TS_W     = 64;   // meter timestamp (QoS memory is T x 8 bytes)
  localparam int JOB_ID_W = 64;   // job-id field of the log, 8 B
  localparam int REQ_ID_W = 8;
  localparam int RES_ID_W = 8;
  localparam int NONCE_W  = 8;    // nonce sequence entries are 1 byte
  localparam int ADDR_W   = 64;
  localparam int DATA_W   = 64;
  localparam int DIGEST_W = 128;  // tabulation-hash digest (HoI, HoO, HoT)
  localparam int TAB_ENTRIES = 256; // 8-bit tokens index a 256-entry table

  // Clock used to turn cycles into bytes per second (3.4 GHz system clock)
  localparam longint unsigned FREQ_HZ = 64'd3_400_000_000;

  typedef enum logic {OP_READ = 1'b0, OP_WRITE = 1'b1} op_e;

  // Payload of a guest resource request or response.  res_id and op travel in
  // clear so that the gateway can check the access list before decryption.
  typedef struct packed {
    logic [RES_ID_W-1:0] res_id;
    op_e                 op;
    logic [ADDR_W-1:0]   addr;
    logic [DATA_W-1:0]   data;
  } payload_t;

  // Plain text of a request digest (guest -> host direction)
  typedef struct packed {
    logic [JOB_ID_W-1:0] job_id;
    logic [REQ_ID_W-1:0] req_id;
    logic [RES_ID_W-1:0] res_id;
    logic [TS_W-1:0]     time_stamp;
    logic [NONCE_W-1:0]  nonce;
  } req_msg_t;

  localparam int KEY_W = $bits(req_msg_t);  // GMK width: widest message
  typedef logic [KEY_W-1:0] digest_t;

  // Plain text of a response digest (host -> guest direction)
  typedef struct packed {
    logic [KEY_W-REQ_ID_W-TS_W-NONCE_W-1:0] pad;
    logic [REQ_ID_W-1:0] req_id;
    logic [TS_W-1:0]     time_stamp;
    logic [NONCE_W-1:0]  nonce;
  } rsp_msg_t;

  // Plain text of a job-create digest (host -> guest direction)
  typedef struct packed {
    logic [KEY_W-JOB_ID_W-TS_W-NONCE_W-1:0] pad;
    logic [JOB_ID_W-1:0] job_id;
    logic [TS_W-1:0]     time_stamp;
    logic [NONCE_W-1:0]  nonce;
  } job_msg_t;

  // "job create" message of issue(taskcode, input, output, ip-length, op-length)
  typedef struct packed {
    logic [7:0]        taskcode;
    logic [ADDR_W-1:0] in_addr;
    logic [ADDR_W-1:0] out_addr;
    logic [31:0]       in_len;
    logic [31:0]       out_len;
  } job_cmd_t;

  // Job log, without its checksum (546 B)
  localparam int LOG_R     = 4;
  localparam int LOG_NBINS = 16;
  typedef struct packed {
    logic [127:0]                timestamp;      // 16 B
    logic [JOB_ID_W-1:0]         job_id;         // 8 B
    logic [7:0]                  guest_id;       // 1 B
    logic [7:0]                  job_type;       // 1 B
    logic [31:0]                 qos_latency;    // 4 B, cycles
    logic [31:0]                 qos_throughput; // 4 B, output bytes per second
    logic [LOG_R*LOG_NBINS*32-1:0] qoe;          // 256 B, bin r*NBINS+b at the low end first
    logic [1023:0]               hoi;            // 128 B, 128-bit digest in the low bits
    logic [1023:0]               hoo;            // 128 B
  } log_body_t;

  localparam int LOG_BODY_BYTES = $bits(log_body_t) / 8;      // 546
  localparam int LOG_BYTES      = LOG_BODY_BYTES + 32;        // 578
  localparam int LOG_WORDS      = (LOG_BYTES * 8 + 63) / 64;  // 73 x 64-bit words
  typedef logic [LOG_WORDS*64-1:0] log_flat_t;                // body, mac, zero pad

endpackage

// openpet_pkg: types and constants shared by the OpenPET firmware blocks.
//
// It holds the 80-bit command/reply packet (CMD ID, SRC Addr, DST Addr,
// Payload), the 16-bit node address layout, the Scope-mode settings word,
// the three 32-bit Scope-mode data packets (detector board header, channel
// header, ADC sample) with their 4-bit packet IDs, and the command
// identifiers the firmware understands.
//
// Taken from the OpenPET description: packet field widths and order, the
// address bit map (bit 15 broadcast ... bits 2:0 detector board), the header
// and sample bit maps, packet IDs 0x4/0x3/0x1, the scope setting field widths
// (4/9/4/4 bits) and the c/r flag in bit 15 of the command ID.
// Own choices: the numeric command identifiers, the bit positions of the
// scope setting fields inside the payload, and the codes used for the
// "unknown command" and "timed out" replies.
package openpet_pkg;

  // ---------------------------------------------------------------- commands
  localparam int unsigned CMD_BITS     = 80;  // default command length
  localparam int unsigned SPI_BITS     = 32;  // width of one SPI transaction

  typedef struct packed {
    logic        cr;      // c/r flag: 0 command, 1 reply / non-blocking cmd
    logic [14:0] id;      // command identifier
  } cmd_id_t;

  typedef struct packed {
    logic       broadcast;  // 15
    logic       host_pc;    // 14
    logic       unused;     // 13
    logic       mbc;        // 12 multiplexer board controller
    logic       cduc;       // 11 coincidence and detector unit controller
    logic       cuc;        // 10 coincidence unit controller
    logic       duc;        // 9  detector unit controller
    logic [2:0] mb;         // 8:6 multiplexer board address
    logic [2:0] du;         // 5:3 detector unit address
    logic [2:0] db;         // 2:0 detector board address
  } addr_t;

  typedef struct packed {
    cmd_id_t     cmd;
    addr_t       src;
    addr_t       dst;
    logic [31:0] payload;
  } cmd_pkt_t;

  // Command identifiers (15-bit values; numeric codes are this design's own).
  localparam logic [14:0] CMD_PING                    = 15'h0001;
  localparam logic [14:0] CMD_SET_SYS_DATA_MODE       = 15'h0010;
  localparam logic [14:0] CMD_SET_SYS_DATA_MODE_SETTINGS = 15'h0011;
  localparam logic [14:0] CMD_SET_SYS_DATA_MODE_ACTION = 15'h0012;
  localparam logic [14:0] CMD_SET_TRIGGER_MASK        = 15'h0013;
  localparam logic [14:0] CMD_SET_FW_THRESHOLD        = 15'h0014;
  // Standard replies a child places in the command-ID half of its answer.
  localparam logic [15:0] CMD_STDCMD_UNKNOWN          = 16'hFFFE;
  localparam logic [15:0] CMD_STDCMD_TIMEDOUT         = 16'hFFFD;

  // Status returned by the parent's write flow.
  typedef enum logic [1:0] {
    WR_OK   = 2'h0,   // child echoed cmd_id + dst and began execution
    WR_BUSY = 2'h1,   // child answered something else
    WR_DEAD = 2'h2    // all ones or all zeros: no child or dead child
  } wr_status_t;

  // System data modes (payload of SET_SYS_DATA_MODE).
  localparam logic [3:0] MODE_IDLE  = 4'h0;
  localparam logic [3:0] MODE_SCOPE = 4'h1;

  // ---------------------------------------------------------- scope settings
  typedef struct packed {
    logic [10:0] unused;        // 31:21
    logic [3:0]  trig_window;   // 20:17 samples watched after a trigger
    logic [3:0]  pre_samples;   // 16:13 samples kept before the trigger
    logic [8:0]  num_samples;   // 12:4  samples streamed per channel
    logic [3:0]  data_format;   // 3:0
  } scope_cfg_t;

  // ------------------------------------------------------------ data packets
  localparam logic [3:0] PID_SAMPLE    = 4'h1;
  localparam logic [3:0] PID_CH_HDR    = 4'h3;
  localparam logic [3:0] PID_DB_HDR    = 4'h4;

  typedef struct packed {
    logic [3:0] pid;            // 31:28 = 0x4
    logic [3:0] unused_hi;      // 27:24
    logic [4:0] data_format;    // 23:19
    logic [2:0] mb_addr;        // 18:16
    logic [2:0] duc_addr;       // 15:13
    logic [2:0] db_addr;        // 12:10
    logic [3:0] unused_lo;      // 9:6
    logic [5:0] num_ch_hdr;     // 5:0
  } db_hdr_t;

  typedef struct packed {
    logic [3:0]  pid;           // 31:28 = 0x3
    logic [5:0]  ch_addr;       // 27:22
    logic        fw_hit;        // 21 firmware trigger hit
    logic        hw_hit;        // 20 hardware trigger hit (energy)
    logic [19:0] tdc;           // 19:0
  } ch_hdr_t;

  typedef struct packed {
    logic [3:0]  pid;           // 31:28 = 0x1
    logic [27:0] data;          // raw ADC sample in the low bits
  } sample_pkt_t;

endpackage

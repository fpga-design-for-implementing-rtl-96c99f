// das_pkg: types and constants shared by the SDRAM data-acquisition design.
//
// The widths follow the document: a 12-bit ADC, the x16 organisation of the
// 512 Mb SDRAM (16-bit words), the 31-bit local-bus address RADDR[30:0] and
// the 4-bit burst size B_SIZE[3:0] of the SDRAM controller's local bus. The
// configuration struct carries the controller's run-time timing and geometry
// fields with the port widths of its parameter table. Three main modules (one
// per SDRAM) is the document's count. The buffer-state encoding and the bus
// structs are this design's own packaging of those signals.
package das_pkg;

  localparam int ADC_W  = 12;  // ADS5463 sample width
  localparam int DATA_W = 16;  // SDRAM x16 data word
  localparam int ADDR_W = 31;  // RADDR[30:0]
  localparam int BSZ_W  = 4;   // B_SIZE[3:0]
  localparam int NBUF   = 3;   // main modules / SDRAM devices

  // Words in one 512 Mb x16 device: 4 banks x 8192 rows x 1024 columns.
  localparam int unsigned SDRAM_WORDS = 4 * 8192 * 1024;

  // Run-time SDRAM controller settings (speed grade and geometry).
  typedef struct packed {
    logic [3:0]  ras;      // tRAS, clocks
    logic [2:0]  rcd;      // tRCD
    logic [1:0]  rrd;      // tRRD
    logic [2:0]  rp;       // tRP
    logic [3:0]  rc;       // tRC
    logic [3:0]  rfc;      // tRFC
    logic [2:0]  mrd;      // tMRD
    logic [2:0]  cl;       // CAS latency
    logic [1:0]  bl;       // burst length code: 0..3 -> 1,2,4,8
    logic [1:0]  wr;       // tWR
    logic [15:0] delay;    // power-up delay, clocks
    logic [15:0] ref_per;  // auto-refresh period, clocks
    logic [2:0]  colbits;  // 3..7 -> 8..12 column bits
    logic [1:0]  rowbits;  // 0..3 -> 11..14 row bits
    logic        regdimm;
  } sdr_cfg_t;

  // Local-bus request side, from a main module to its SDRAM controller.
  typedef struct packed {
    logic [ADDR_W-1:0] raddr;
    logic [BSZ_W-1:0]  b_size;
    logic              r_req;
    logic              w_req;
    logic              auto_pch;
    logic [DATA_W-1:0] datain;
  } lb_req_t;

  // Local-bus response side, from the SDRAM controller to a main module.
  typedef struct packed {
    logic              rw_ack;
    logic              d_req;
    logic              w_valid;
    logic              r_valid;
    logic [DATA_W-1:0] dataout;
  } lb_rsp_t;

  // Life cycle of one SDRAM buffer under the main module controller.
  typedef enum logic [1:0] {
    BUF_EMPTY   = 2'd0,
    BUF_WRITING = 2'd1,
    BUF_FULL    = 2'd2,
    BUF_READING = 2'd3
  } buf_state_e;

endpackage

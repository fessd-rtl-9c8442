// fessd_pkg: types and constants shared by the access-control memory (ACM)
// and the encrypted write-buffer datapath.
//
// The ACM is reached through a simple word bus: a request struct (valid,
// write, word address, write data) and a response struct returned exactly one
// cycle after an accepted request (valid, granted, read data). The register
// window of the ACM occupies the top half of its address space; the word
// offsets inside that window are defined here. The 128-bit code width follows
// the FESSD proposal's minimum; the 32-bit bus and the register map are this
// design's own choices.
package fessd_pkg;

  localparam int unsigned CODE_W      = 128;  // access-code width
  localparam int unsigned KEY_W       = 128;  // per-sector encryption key width
  localparam int unsigned DATA_W      = 32;   // ACM bus data width
  localparam int unsigned ADDR_W      = 32;   // width of the address field in the bus struct
  localparam int unsigned CODE_WORDS  = CODE_W / DATA_W;
  localparam int unsigned KEY_WORDS   = KEY_W / DATA_W;

  // Word offsets inside the ACM register window.
  localparam logic [3:0] OFF_PRESENT = 4'd0;  // 0..3: code presented by firmware (write-only)
  localparam logic [3:0] OFF_NEWCODE = 4'd4;  // 4..7: new access code, update on offset 7 (write-only)
  localparam logic [3:0] OFF_STATUS  = 4'd8;  // 8: bit 0 = matching register (read-only)

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;   // word address
    logic [DATA_W-1:0] wdata;
  } acm_req_t;

  typedef struct packed {
    logic              valid;  // response to the request of the previous cycle
    logic              ok;     // access granted by the access control
    logic [DATA_W-1:0] rdata;  // read data, or the reset value when refused
  } acm_rsp_t;

endpackage

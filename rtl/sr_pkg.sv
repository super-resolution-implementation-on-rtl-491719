// Shared types and constants of the super-resolution design.
//
// Number format: every pixel, feature-map value, weight and bias is a 16-bit
// two's-complement fixed-point number with 8 fraction bits (Q8.8). This format
// is a choice of this design; the network itself (9x9 / 1x1 / 5x5 SRCNN with
// 64 and 32 feature maps) follows the three-stage structure of the algorithm.
//
// The OCP bundle types describe the memory port of the application block:
// the master side (app_m2s) carries command, address, burst length, write data
// with byte enables and data-valid, response-accept and tag; the slave side
// (app_s2m) carries command-accept, data-accept, read data, response and tag,
// as in the OCP burst read and write timing used by the board's memory path.
package sr_pkg;

  localparam int DW   = 16;  // data word of the pixel pipeline
  localparam int FRAC = 8;   // fraction bits of DW values

  typedef logic signed [DW-1:0] pix_t;

  // Weight / bias load bus, shared by every processing element.
  // stage selects stage 1..3, unit the PE inside it, addr the tap (weight index).
  typedef struct packed {
    logic        we;     // write strobe
    logic        bias;   // 1: write the bias of the unit, 0: write weight[addr]
    logic [1:0]  stage;  // 1, 2 or 3
    logic [7:0]  unit;   // PE number inside the stage
    logic [7:0]  addr;   // tap number
    logic [DW-1:0] data;
  } wload_t;

  // ---------------- OCP ----------------
  localparam int OCP_AW  = 32;   // byte address
  localparam int OCP_DW  = 64;   // data word: four 16-bit pixels
  localparam int OCP_BLW = 8;    // burst length field
  localparam int OCP_TW  = 4;    // tag width

  typedef enum logic [2:0] {
    OCP_IDLE = 3'd0,
    OCP_WR   = 3'd1,
    OCP_RD   = 3'd2
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    OCP_NONE = 2'd0,
    OCP_DVA  = 2'd1   // response VALID
  } ocp_resp_e;

  typedef struct packed {
    ocp_cmd_e               cmd;
    logic [OCP_AW-1:0]      addr;
    logic [OCP_BLW-1:0]     burst_len;
    logic [OCP_DW-1:0]      data;
    logic [OCP_DW/8-1:0]    byte_en;
    logic                   data_valid;
    logic                   resp_accept;
    logic [OCP_TW-1:0]      tag;
  } ocp_m2s_t;

  typedef struct packed {
    logic                   cmd_accept;
    logic                   data_accept;
    logic [OCP_DW-1:0]      data;
    ocp_resp_e              resp;
    logic [OCP_TW-1:0]      tag;
  } ocp_s2m_t;

  // Arithmetic shift right by FRAC and saturation to DW bits.
  function automatic pix_t sat_shift(input logic signed [47:0] acc);
    logic signed [47:0] s;
    s = acc >>> FRAC;
    if (s > 48'sd32767)       return pix_t'(16'sh7fff);
    else if (s < -48'sd32768) return pix_t'(16'sh8000);
    else                      return pix_t'(s[DW-1:0]);
  endfunction

endpackage

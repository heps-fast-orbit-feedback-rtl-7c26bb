// fofb_pkg: types and constants shared by the fast orbit feedback (FOFB) blocks.
//
// The storage ring has 48 cells with 12 BPMs each (576 BPMs), 4 fast correctors per cell
// and plane, and 16 FOFB stations, each serving 3 cells (36 BPMs, 12 correctors per plane,
// 24 power-supply controllers). The power-supply link carries 43-bit frames
// Start(1)=0, ID(8), Data(24), CRC(8), Stop(2)=11, CRC-8 polynomial x^8+x^7+x^5+x^4+x+1.
// These numbers and the frame IDs follow the system description. Data widths of BPM
// samples, the packet layout and the index space are this design's own choices.
package fofb_pkg;

  localparam int N_UNITS        = 16;   // FOFB stations on the FOFB ring
  localparam int N_CELLS_UNIT   = 3;    // BPM stations (cells) per FOFB station
  localparam int N_BPM_STATION  = 12;   // BPMs per BPM station
  localparam int N_BPM_UNIT     = N_CELLS_UNIT * N_BPM_STATION;  // 36
  localparam int N_BPM_TOTAL    = N_UNITS * N_BPM_UNIT;          // 576
  localparam int N_FC_PLANE     = 12;   // fast correctors per plane and station
  localparam int N_PSC          = 2 * N_FC_PLANE;               // 24

  localparam int BPM_W   = 32;          // FA position sample, signed, nm
  localparam int IDX_W   = 10;          // global BPM index
  localparam int SEQ_W   = 16;          // FA sequence number carried by BPM samples
  localparam int UNIT_W  = 4;           // FOFB station number
  localparam int SP_W    = 24;          // corrector setpoint: sign, 4 integer, 19 fraction bits

  // Power-supply link frame
  localparam int FRAME_BITS = 1 + 8 + SP_W + 8 + 2;              // 43
  localparam logic [7:0] CRC8_POLY = 8'hB3;                      // x^8+x^7+x^5+x^4+x+1

  // Request IDs sent to a power-supply controller
  localparam logic [7:0] ID_SET_SP_READ  = 8'h15;  // set setpoint, read status and readbacks
  localparam logic [7:0] ID_SET_CMD_READ = 8'h0A;  // set command, read status and readbacks
  localparam logic [7:0] ID_READ_ALL     = 8'h40;  // read status and readbacks
  localparam logic [7:0] ID_SET_SP       = 8'h55;  // set setpoint only
  localparam logic [7:0] ID_SET_CMD      = 8'h4A;  // send command only
  localparam logic [7:0] ID_READ_SP_CMD  = 8'h00;  // read setpoint and command
  localparam logic [7:0] ID_READ_CFG     = 8'h01;  // read configuration
  localparam logic [7:0] ID_RESERVED     = 8'h02;

  // Response IDs returned by a power-supply controller
  localparam logic [7:0] RID_CURRENT = 8'h90;
  localparam logic [7:0] RID_STATUS  = 8'h93;
  localparam logic [7:0] RID_COMMAND = 8'h95;
  localparam logic [7:0] RID_VERSION = 8'h96;
  localparam logic [7:0] RID_SPBACK  = 8'h8A;
  localparam logic [7:0] RID_CONFIG  = 8'h8B;

  // Number of frames a power-supply controller returns for a request, echo included.
  function automatic logic [2:0] psc_resp_frames(input logic [7:0] id);
    case (id)
      ID_SET_SP_READ, ID_SET_CMD_READ, ID_READ_ALL: return 3'd5;
      ID_READ_SP_CMD, ID_READ_CFG:                  return 3'd3;
      default:                                      return 3'd1;
    endcase
  endfunction

  // One BPM FA sample as delivered by a BPM to its BPM data transceiver
  typedef struct packed {
    logic [SEQ_W-1:0]        seq;
    logic signed [BPM_W-1:0] x;
    logic signed [BPM_W-1:0] y;
  } bpm_fa_t;

  // One BPM packet on the BDT links and on the FOFB ring
  typedef struct packed {
    logic [UNIT_W-1:0]       src;   // station that injected it into the ring
    logic [IDX_W-1:0]        idx;   // global BPM index
    logic                    ok;    // sample present and aligned
    logic signed [BPM_W-1:0] x;
    logic signed [BPM_W-1:0] y;
  } bpm_pkt_t;

  // Configuration write bus from the control server
  typedef struct packed {
    logic        we;
    logic [19:0] addr;
    logic [31:0] wdata;
  } cfg_wr_t;

  // Register map (addr[19:16] selects the region)
  localparam logic [3:0] REG_REGION  = 4'h0;
  localparam logic [3:0] MATX_REGION = 4'h1;   // addr[15:10] = corrector, addr[9:0] = BPM
  localparam logic [3:0] MATY_REGION = 4'h2;
  localparam logic [3:0] OFSX_REGION = 4'h3;   // addr[9:0] = BPM
  localparam logic [3:0] OFSY_REGION = 4'h4;

  localparam logic [15:0] REG_CTRL     = 16'h0000;  // bit0 feedback on, bit1 clear integrators
  localparam logic [15:0] REG_BPM_WAIT = 16'h0001;  // cycles from FA trigger to calculation
  localparam logic [15:0] REG_TRUNC    = 16'h0002;  // setpoint bit position (0..32)
  localparam logic [15:0] REG_PSC_ID   = 16'h0003;  // request ID used each FA cycle
  localparam logic [15:0] REG_PSC_CMD  = 16'h0004;  // command word for command requests
  localparam logic [15:0] REG_X_KP     = 16'h0010;
  localparam logic [15:0] REG_X_KI     = 16'h0011;
  localparam logic [15:0] REG_X_KD     = 16'h0012;
  localparam logic [15:0] REG_Y_KP     = 16'h0013;
  localparam logic [15:0] REG_Y_KI     = 16'h0014;
  localparam logic [15:0] REG_Y_KD     = 16'h0015;
  localparam logic [15:0] REG_UNIT_ID  = 16'h0020;

endpackage

// slide_pkg: types and constants shared by the SlideAcross router blocks.
//
// A flit is {type, class VC, SVC tag, 128-bit payload}. The class VC (VC0/VC1) is
// chosen once at injection for deadlock freedom and kept for the whole trip; the
// SVC tag says the flit currently travels in the slide virtual channel, the lane
// that may take the single-cycle bypass. A head flit carries its header (final
// x,y,z and the x,y of the vertical hub used to leave the layer) in the low bits of
// the payload. The 128-bit width, the 5-port router and the 4x4x4 mesh follow the
// document; the field layout and lane numbering are this design's choices.
package slide_pkg;

  localparam int DATA_W  = 128;          // bypass datapath width
  localparam int NPORT   = 5;            // Local, East, West, North, South
  localparam int NLANE   = 3;            // VC0, VC1, SVC per input port
  localparam int MESH_X  = 4;
  localparam int MESH_Y  = 4;
  localparam int MESH_Z  = 4;
  localparam int COORD_W = 2;            // enough for 4 nodes per dimension
  localparam int CNT_W   = 4;            // credit counter width

  // Port numbering; North is +y, East is +x.
  localparam int P_LOCAL = 0;
  localparam int P_EAST  = 1;
  localparam int P_WEST  = 2;
  localparam int P_NORTH = 3;
  localparam int P_SOUTH = 4;

  // Lane numbering inside an input port / output VC numbering at an output port.
  localparam int L_VC0 = 0;
  localparam int L_VC1 = 1;
  localparam int L_SVC = 2;

  typedef enum logic [1:0] {
    FT_HEAD     = 2'd0,
    FT_BODY     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic                vc;     // class VC: 0 = VC0, 1 = VC1
    logic                svc;    // SVC tag
    logic [DATA_W-1:0]   data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  typedef struct packed {
    logic [COORD_W-1:0] hub_x;   // in-layer position of the 3D router to use
    logic [COORD_W-1:0] hub_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_z;
  } hdr_t;

  localparam int HDR_W = $bits(hdr_t);

  function automatic hdr_t get_hdr(flit_t f);
    return hdr_t'(f.data[HDR_W-1:0]);
  endfunction

  function automatic logic is_head(ftype_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  // Output on the opposite side of an input port (the straight-through direction).
  function automatic int unsigned opposite(int unsigned p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage

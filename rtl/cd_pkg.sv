// cd_pkg: types shared by the sphere collision accelerator.
//
// A sphere is four single-precision numbers (centre x, y, z and radius) in
// one 128-bit record, four per 512-bit shared-memory line. A contact result
// is seven numbers (contact position, contact normal, penetration depth)
// plus a word holding the collision type, 256 bits, two per line. The field
// order inside a record (x in the lowest word) is this design's choice.
package cd_pkg;
  localparam int LINE_W   = 512;
  localparam int SPH_W    = 128;
  localparam int RES_W    = 256;
  localparam int SADDR_W  = 16;  // sphere addresses in a collision line
  localparam int PAIRS_PER_LINE = LINE_W / (2 * SADDR_W);  // 16

  typedef logic [31:0] f32_t;

  typedef struct packed {
    f32_t r;
    f32_t z;
    f32_t y;
    f32_t x;
  } sphere_t;

  typedef enum logic [1:0] {
    COLL_FAKE    = 2'd0,   // centres farther apart than r1 + r2: no contact
    COLL_GRAZING = 2'd1,   // coincident centres: depth r1 + r2, normal (1,0,0)
    COLL_REAL    = 2'd2    // contact with a depth
  } coll_type_e;

  typedef struct packed {
    logic [29:0] rsvd;
    coll_type_e  ctype;
    f32_t depth;
    f32_t nz;
    f32_t ny;
    f32_t nx;
    f32_t pz;
    f32_t py;
    f32_t px;
  } contact_t;
endpackage

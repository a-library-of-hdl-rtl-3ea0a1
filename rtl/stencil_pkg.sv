// Shared types of the stencil library.
//
// stencil_kind_e selects the transition function computed by an ISL
// processing element: the Jacobi average of the cross-shaped window or the
// Heat update. pool_type_e selects max or min pooling in the CNN pooling core.
package stencil_pkg;
  typedef enum logic [0:0] {
    JACOBI = 1'b0,
    HEAT   = 1'b1
  } stencil_kind_e;

  typedef enum logic [0:0] {
    POOL_MAX = 1'b0,
    POOL_MIN = 1'b1
  } pool_type_e;
endpackage

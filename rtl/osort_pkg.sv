// Shared types of the OSort Cluster Module: the operation code of the
// Arithmetic Units and the stage encoding of the controller, which is also
// brought out as a status port so that testbenches and a host can follow the
// algorithm stage by stage.
package osort_pkg;
  // Operation of an Arithmetic Unit.
  typedef enum logic {
    AU_DIST  = 1'b0,   // (x - m)^2
    AU_BLEND = 1'b1    // m + w * (x - m)
  } au_mode_e;

  // Stage of the Cluster Module, visible on its status port.
  typedef enum logic [3:0] {
    ST_IDLE    = 4'd0,
    ST_LOAD    = 4'd1,   // spike stream -> spike memory
    ST_S1      = 4'd2,   // distance of the spike to every live cluster
    ST_DECIDE  = 4'd3,   // compare the minimum with T_C
    ST_S2      = 4'd4,   // update a cluster mean or store a new cluster
    ST_UPD     = 4'd5,   // count and weight of the updated cluster
    ST_S3      = 4'd6,   // distance of the updated mean to every other cluster
    ST_MDIV    = 4'd7,   // merge weight n/(n+m)
    ST_S4      = 4'd8,   // merge two clusters
    ST_MUPD    = 4'd9,   // count, weight and merge table after a merge
    ST_DEC3    = 4'd10,  // compare the minimum with T_M
    ST_OUT     = 4'd11   // cluster number on the output stream
  } stage_e;
endpackage

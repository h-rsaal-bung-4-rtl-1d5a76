// cache_pkg: types shared by the direct-mapped cache and its line fetcher.
//
// A request to the memory above the cache is either a read of one whole line
// or a write of one whole line with a byte-enable mask (RAM_READ / RAM_WRITE).
// A request from the cache to the fetcher is one of three operations:
//   FETCH       read a new line,
//   FETCH_DIRTY write the evicted (dirty) line back, then read the new line,
//   JUST_WRITE  write a line back without reading anything.
// The encodings are this design's own choice.
package cache_pkg;

  typedef enum logic {
    RAM_READ  = 1'b0,
    RAM_WRITE = 1'b1
  } ram_op_e;

  typedef enum logic [1:0] {
    FETCH       = 2'd0,
    FETCH_DIRTY = 2'd1,
    JUST_WRITE  = 2'd2
  } fetch_op_e;

endpackage

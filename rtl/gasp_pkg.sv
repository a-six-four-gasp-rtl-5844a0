// gasp_pkg -- widths and types shared by the 6-4 GasP modules.
//
// A GasP stage moves one message per firing. A message has 15 "address"
// bits -- fourteen numeric ones, a[1:14], and the token bit T -- and 37
// "data" bits, d[1:37]. The address bits are latched as soon as a stage
// fires and may steer control (the branch direction); the data bits are
// latched two gate delays later and only when T is ONE (clock gating).
// The bit counts are the ones the GasP modules are drawn with; the field
// order inside the packed structs is this design's own choice.
package gasp_pkg;

  parameter int unsigned ADDR_NUM_BITS = 14;  // a[1:14]
  parameter int unsigned DATA_BITS     = 37;  // d[1:37]

  // a[1:14,T]: num[k] holds a[k]; t is the token bit T.
  typedef struct packed {
    logic                        t;
    logic [ADDR_NUM_BITS:1]      num;
  } addr_t;

  typedef logic [DATA_BITS:1] data_t;

endpackage

// Tag comparator of one cache way.
//
// A line is tagged either virtually (V/P bit = 0: virtual tag extended with
// the PID of its process) or physically (V/P bit = 1: physical tag of a
// shared page). The V/P bit acts as a tag extension, so a virtual and a
// physical tag with equal bits never match each other. The PID takes part
// only for virtual lines; a physical line serves every process that maps
// the shared page.
//
// Purely combinational.
module tag_compare
  import htag_pkg::*;
#(
  parameter int unsigned TAG_W = 17
) (
  input  logic             line_valid,
  input  logic             line_phys,
  input  pid_t             line_pid,
  input  logic [TAG_W-1:0] line_tag,
  input  logic             req_phys,
  input  pid_t             req_pid,
  input  logic [TAG_W-1:0] req_tag,
  output logic             hit
);

  assign hit = line_valid && (line_phys == req_phys) && (line_tag == req_tag)
               && (req_phys || (line_pid == req_pid));

endmodule

// researcher_table_pkg: sample researcher records for the database
// testbenches (number = position + 1, six-letter ID, last name, first name,
// research area 1, research area 2, location) and the 5-bit character code
// used for IDs and record fields: blank = 0, a..z = 1..26 (upper case folded
// to lower case), underscore = 27.
package researcher_table_pkg;
  import cascade_prog_pkg::*;

  localparam int unsigned K = 22;

  localparam string TBL [K][6] = '{
    '{"vranes", "Vranesic",  "Zvonko",   "circuit",         "logic design",      "Toronto"},
    '{"moraga", "Moraga",    "Claudio",  "spectral method", "fuzzy logic",       "Dortmund"},
    '{"smith",  "Smith",     "Kenneth",  "circuit",         "",                  "Toronto"},
    '{"muzio",  "Muzio",     "Jon",      "spectral method", "test",              "Victoria"},
    '{"miller", "Miller",    "Michael",  "spectral method", "logic design",      "Victoria"},
    '{"rosenb", "Rosenberg", "Ivo",      "clone theory",    "",                  "Montreal"},
    '{"higuch", "Higuchi",   "Tatsuo",   "circuit",         "signal processing", "Sendai"},
    '{"kameya", "Kameyama",  "Michitaka","circuit",         "logic design",      "Sendai"},
    '{"ishizu", "Ishizuka",  "Okihiko",  "circuit",         "logic design",      "Miyazaki"},
    '{"sasao",  "Sasao",     "Tsutomu",  "logic design",    "decision diagram",  "Iizuka"},
    '{"butler", "Butler",    "Jon",      "logic design",    "decision diagram",  "Monterey"},
    '{"mukaid", "Mukaidono", "Masao",    "fuzzy logic",     "logic design",      "Tokyo"},
    '{"simovi", "Simovic",   "Dan",      "algebra",         "database",          "Boston"},
    '{"perkow", "Perkowski", "Marek",    "logic design",    "decision diagram",  "Portland"},
    '{"hanyu",  "Hanyu",     "Takahiro", "circuit",         "logic design",      "Sendai"},
    '{"falkow", "Falkowski", "Bogdan",   "spectral method", "logic design",      "Singapore"},
    '{"aoki",   "Aoki",      "Takafumi", "circuit",         "arithmetic",        "Sendai"},
    '{"hata",   "Hata",      "Yutaka",   "fuzzy logic",     "image processing",  "Himeji"},
    '{"dubrov", "Dubrova",   "Elena",    "logic design",    "test",              "Stockholm"},
    '{"dueck",  "Dueck",     "Gerhard",  "logic design",    "reversible",        "Fredericton"},
    '{"thornt", "Thornton",  "Mitch",    "spectral method", "decision diagram",  "Dallas"},
    '{"drechs", "Drechsler", "Rolf",     "decision diagram","verification",      "Bremen"}};

  function automatic logic [4:0] code(byte c);
    if (c >= "a" && c <= "z") return 5'(c - "a" + 1);
    if (c >= "A" && c <= "Z") return 5'(c - "A" + 1);
    if (c == "_") return 5'd27;
    return 5'd0;
  endfunction

  // n characters, first in the upper bits, blank padded
  function automatic vec_t enc(string s, int unsigned n);
    vec_t v;
    v = '0;
    for (int i = 0; i < n; i++) v = (v << 5) | vec_t'((i < s.len()) ? code(s[i]) : 5'd0);
    return v;
  endfunction

endpackage
